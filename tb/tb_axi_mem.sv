// tb_axi_mem: behavioural model (testbench only) of a cluster's local data
// memory as seen through the cluster interconnect: an AXI4 slave with 64-bit
// data.
//
// Reads: AR requests (INCR bursts) are queued; R returns their beats in order,
// one per cycle. Writes: AW and W beats are queued independently, written as
// pairs and answered on B. stall_pct (0..100) is the percentage of cycles in which
// each ready/valid the model drives is withheld, to exercise back-pressure
// (a valid, once shown, is held until it is taken).
// Word index = addr[3 +: log2(WORDS)]; the array `mem` is read and written by
// the testbenches through the backdoor port.
module tb_axi_mem
  import noc_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  input  int       stall_pct,
  input  axi_req_t req,
  output axi_rsp_t rsp,
  // backdoor for the testbench: word-indexed write (at posedge) and read
  input  logic     bd_we,
  input  int       bd_widx,
  input  data_t    bd_wdata,
  input  int       bd_ridx,
  output data_t    bd_rdata
);
  localparam int unsigned IW = $clog2(WORDS);

  data_t   mem [WORDS];
  axi_ax_t ar_q [$];
  axi_ax_t aw_q [$];
  data_t   w_q  [$];
  logic [AXI_ID_W-1:0] b_q [$];
  int      beat;
  int unsigned n_writes, n_reads;
  logic    st_ar, st_aw, st_w, st_r, st_b;
  logic    r_hold, b_hold;   // a shown R/B beat stays valid until taken (AXI rule)

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    n_writes = 0;
    n_reads  = 0;
  end

  always @(negedge clk) begin
    st_ar <= ($urandom_range(99) < stall_pct);
    st_aw <= ($urandom_range(99) < stall_pct);
    st_w  <= ($urandom_range(99) < stall_pct);
    st_r  <= ($urandom_range(99) < stall_pct);
    st_b  <= ($urandom_range(99) < stall_pct);
  end

  function automatic logic [IW-1:0] widx(addr_t a);
    return a[3 +: IW];
  endfunction

  always_comb begin
    rsp          = '0;
    rsp.ar_ready = !st_ar && (ar_q.size() < 8);
    rsp.aw_ready = !st_aw && (aw_q.size() < 8);
    rsp.w_ready  = !st_w  && (w_q.size()  < 8);
    rsp.r_valid  = (!st_r || r_hold) && (ar_q.size() != 0);
    if (ar_q.size() != 0) begin
      rsp.r.id   = ar_q[0].id;
      rsp.r.data = mem[widx(ar_q[0].addr + addr_t'(beat * 8))];
      rsp.r.resp = AXI_OKAY;
      rsp.r.last = (beat == int'(ar_q[0].len));
    end
    rsp.b_valid  = (!st_b || b_hold) && (b_q.size() != 0);
    if (b_q.size() != 0) rsp.b.id = b_q[0];
  end

  assign bd_rdata = mem[bd_ridx[IW-1:0]];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_q.delete(); aw_q.delete(); w_q.delete(); b_q.delete();
      beat <= 0;
      r_hold <= 1'b0;
      b_hold <= 1'b0;
    end else begin
      r_hold <= rsp.r_valid && !req.r_ready;
      b_hold <= rsp.b_valid && !req.b_ready;
      if (rsp.r_valid && req.r_ready) begin
        n_reads <= n_reads + 1;
        if (beat == int'(ar_q[0].len)) begin
          beat <= 0;
          void'(ar_q.pop_front());
        end else begin
          beat <= beat + 1;
        end
      end
      if (req.ar_valid && rsp.ar_ready) ar_q.push_back(req.ar);
      if (rsp.b_valid && req.b_ready) void'(b_q.pop_front());
      // write a queued AW/W pair (single-beat writes)
      if (aw_q.size() != 0 && w_q.size() != 0) begin
        mem[widx(aw_q[0].addr)] <= w_q[0];
        b_q.push_back(aw_q[0].id);
        n_writes <= n_writes + 1;
        void'(aw_q.pop_front());
        void'(w_q.pop_front());
      end
      if (bd_we) mem[bd_widx[IW-1:0]] <= bd_wdata;
      if (req.aw_valid && rsp.aw_ready) aw_q.push_back(req.aw);
      if (req.w_valid && rsp.w_ready)   w_q.push_back(req.w.data);
    end
  end

endmodule
