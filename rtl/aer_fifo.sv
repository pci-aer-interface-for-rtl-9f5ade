// Synchronous first-in first-out buffer, used as the OFIFO (host to AER) and
// the IFIFO (AER to host) of the PCI-AER interface.
//
// A memory array of DEPTH words with read and write pointers one bit wider
// than the address, so full and empty are told apart by the extra bit. The
// head word is shown on rdata while empty is low (first-word fall-through);
// pop removes it at the next clock edge. A push while full and a pop while
// empty are ignored. Push and pop may occur in the same cycle. count gives
// the number of stored words. Both FIFOs are named by the document; their
// depth and this organisation are this design's choice.
module aer_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  // Users check full and empty before pushing and popping.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) full |-> !push)
    else $warning("aer_fifo: push while full dropped");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) empty |-> !pop)
    else $warning("aer_fifo: pop while empty ignored");

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("aer_fifo: DEPTH must be a power of two");
  end
endmodule
