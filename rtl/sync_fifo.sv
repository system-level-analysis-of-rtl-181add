// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the request FIFO inside the NI's Send Control, which lets several
// CPUs of a cluster post send requests without waiting for each other, and as
// the input buffer of every router port. Storage is a register array with
// read and write pointers plus an occupancy counter.
//
// Interface: valid/ready on both sides. push is taken when push_valid and
// push_ready (= not full); pop happens when pop_valid (= not empty) and
// pop_ready. pop_data shows the oldest entry combinationally (first-word
// fall-through), so an entry written at one clock edge can leave at the next.
// A push and a pop may happen in the same cycle. push_ready depends only on
// the occupancy, never on pop_ready, so chains of FIFOs (router to router)
// have no combinational path from a consumer back to a producer.
// The document names the send FIFO but gives neither depth nor width: both
// are parameters here.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_valid,
  output logic             push_ready,
  input  logic [WIDTH-1:0] push_data,
  output logic             pop_valid,
  input  logic             pop_ready,
  output logic [WIDTH-1:0] pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign pop_valid  = (count != '0);
  assign push_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;
  assign pop_data   = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= DEPTH[$clog2(DEPTH+1)-1:0]);

endmodule
