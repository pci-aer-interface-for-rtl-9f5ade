// Two-flip-flop synchroniser for one asynchronous handshake line (AER REQ or
// ACK) entering the clock domain. Output follows the input after two clock
// edges. Reset value is zero, the idle level of the handshake lines here.
module aer_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
