// ni_send_ctrl: Send Control of the NI.
//
// A CPU that has filled a buffer posts a send request: just a pointer to a
// channel descriptor in its own memory. Requests wait in a FIFO, so several
// CPUs can post at once without blocking, and are served one after another:
//   1. read the two-word descriptor at the pointer (one 2-beat AXI burst):
//        word 0: [31:0] buffer pointer, [47:32] length in 64-bit words
//        word 1: [7:0] dst x, [15:8] dst y, [31:16] flow ID,
//                [63:32] local mutex pointer (0 = none)
//   2. read the buffer with INCR bursts of up to BURST_MAX beats (never
//      crossing a 4 KB boundary) and turn every returned beat into one flit:
//      header {dst x, dst y, flow ID, DATA, last, word offset} + 64-bit data.
//      Bursts are issued ahead of the returning data, so with a memory that
//      answers every cycle one flit leaves per clock cycle.
//      A zero-length descriptor sends a single SYNC flit instead, which only
//      sets the mutex at the receiver (used to acknowledge a freed buffer).
//   3. if a local mutex pointer is given, write MUTEX_SET there to tell the
//      sending CPU its buffer may be reused.
// The FIFO, the pointer-only request, the descriptor read before the data and
// one flit per cycle follow the document. The descriptor layout, the burst
// size, the SYNC flit and the local mutex write are this design's choices.
module ni_send_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned BURST_MAX  = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // send requests (from Slave Control)
  input  logic     req_valid,
  output logic     req_ready,
  input  addr_t    req_ptr,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic     busy,
  // AXI read channels (through Master Control)
  output axi_ax_t  ar,
  output logic     ar_valid,
  input  logic     ar_ready,
  input  axi_r_t   r,
  input  logic     r_valid,
  output logic     r_ready,
  // mutex write (through Master Control)
  output wr_req_t  wr_req,
  output logic     wr_valid,
  input  logic     wr_ready,
  // flits into the NoC
  output logic     flit_valid,
  input  logic     flit_ready,
  output flit_t    flit
);
  typedef enum logic [2:0] {S_IDLE, S_DESC_AR, S_DESC_R, S_STREAM, S_SYNC, S_MUTEX} state_e;

  state_e    state;
  logic      fifo_valid, fifo_pop;
  addr_t     fifo_ptr, ptr_q;
  desc_w0_t  w0;
  desc_w1_t  w1;
  logic      beat1;
  addr_t     req_addr;                 // next address to request
  logic [15:0] req_left, rx_cnt;       // words still to request / words received
  logic [9:0]  to_4k;                  // beats up to the next 4 KB boundary
  logic [15:0] burst_beats;
  logic        last_word;
  logic        ar_hs, r_hs;

  sync_fifo #(.WIDTH(AXI_ADDR_W), .DEPTH(FIFO_DEPTH)) u_req_fifo (
    .clk, .rst_n,
    .push_valid(req_valid), .push_ready(req_ready), .push_data(req_ptr),
    .pop_valid(fifo_valid), .pop_ready(fifo_pop), .pop_data(fifo_ptr),
    .count(fifo_count)
  );

  assign fifo_pop = (state == S_IDLE) && fifo_valid;
  assign busy     = (state != S_IDLE);

  // burst size: min(words left, BURST_MAX, beats to the 4 KB boundary)
  assign to_4k = 10'd512 - {1'b0, req_addr[11:3]};
  always_comb begin
    burst_beats = req_left;
    if (burst_beats > 16'(BURST_MAX)) burst_beats = 16'(BURST_MAX);
    if (burst_beats > {6'd0, to_4k})  burst_beats = {6'd0, to_4k};
  end

  always_comb begin
    ar.id    = '0;
    ar.size  = AXI_SIZE_8B;
    ar.burst = AXI_INCR;
    if (state == S_DESC_AR) begin
      ar.addr = ptr_q;
      ar.len  = 8'd1;
    end else begin
      ar.addr = req_addr;
      ar.len  = 8'(burst_beats - 16'd1);
    end
  end
  assign ar_valid = (state == S_DESC_AR) || (state == S_STREAM && req_left != '0);
  assign ar_hs    = ar_valid && ar_ready;

  assign last_word = (rx_cnt == w0.len_words - 16'd1);

  always_comb begin
    r_ready    = (state == S_DESC_R) || (state == S_STREAM && flit_ready);
    flit_valid = (state == S_STREAM && r_valid) || (state == S_SYNC);
    flit.hdr.dst_x   = w1.dst_x[COORD_W-1:0];
    flit.hdr.dst_y   = w1.dst_y[COORD_W-1:0];
    flit.hdr.flow_id = w1.flow_id[FLOW_ID_W-1:0];
    flit.hdr.kind    = (state == S_SYNC) ? FLIT_SYNC : FLIT_DATA;
    flit.hdr.last    = (state == S_SYNC) || last_word;
    flit.hdr.offset  = rx_cnt[OFFSET_W-1:0];
    flit.data        = (state == S_SYNC) ? '0 : r.data;
  end
  assign r_hs = r_valid && r_ready;

  assign wr_valid     = (state == S_MUTEX) && (w1.mutex_ptr != '0);
  assign wr_req.addr  = w1.mutex_ptr;
  assign wr_req.data  = MUTEX_SET;
  assign wr_req.fence = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ptr_q    <= '0;
      w0       <= '0;
      w1       <= '0;
      beat1    <= 1'b0;
      req_addr <= '0;
      req_left <= '0;
      rx_cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (fifo_valid) begin
          ptr_q <= fifo_ptr;
          state <= S_DESC_AR;
        end
        S_DESC_AR: if (ar_hs) begin
          beat1 <= 1'b0;
          state <= S_DESC_R;
        end
        S_DESC_R: if (r_hs) begin
          if (!beat1) begin
            w0    <= desc_w0_t'(r.data);
            beat1 <= 1'b1;
          end else begin
            w1       <= desc_w1_t'(r.data);
            req_addr <= w0.buf_ptr;
            req_left <= w0.len_words;
            rx_cnt   <= '0;
            state    <= (w0.len_words == '0) ? S_SYNC : S_STREAM;
          end
        end
        S_STREAM: begin
          if (ar_hs) begin
            req_addr <= req_addr + AXI_ADDR_W'({burst_beats, 3'b000});
            req_left <= req_left - burst_beats;
          end
          if (r_hs) begin
            rx_cnt <= rx_cnt + 16'd1;
            if (last_word) state <= S_MUTEX;
          end
        end
        S_SYNC: if (flit_ready) state <= S_MUTEX;
        S_MUTEX: if (w1.mutex_ptr == '0 || wr_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_flit_hold: assert property (@(posedge clk) disable iff (!rst_n)
    flit_valid && !flit_ready |=> flit_valid && $stable(flit));

endmodule
