// Bus-master engine of the PCI-AER interface.
//
// Moves event words between host memory and the FIFOs without the processor
// copying them, using master cycles that the PCI core runs on the bus. The
// request side is a simple word handshake: mst_req, mst_we, mst_addr and
// mst_wdata stay stable until the core answers with a one-cycle mst_ack,
// which for a read also carries mst_rdata. start loads the host address and
// the length in words; dir 0 reads host memory into the OFIFO, waiting
// whenever the OFIFO is full; dir 1 writes IFIFO words to host memory and
// stops early when the IFIFO runs empty. Addresses advance by four bytes per
// word. count is the number of words moved so far, and stays readable after
// the end as the last-transfer count; done pulses for one cycle at the end.
// One word is moved per two clock cycles at best (request, acknowledge).
// The document states that the board uses bus mastering and names the master
// address and last-transfer counter registers; the handshake, the early stop
// and the rest of the sequencing are this design's choices.
module pci_aer_dma
  import pci_aer_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dir,
  input  logic [15:0]      len,
  input  logic [31:0]      base,
  // master side of the PCI core
  output logic             mst_req,
  output logic             mst_we,
  output logic [31:0]      mst_addr,
  output logic [31:0]      mst_wdata,
  input  logic             mst_ack,
  input  logic [31:0]      mst_rdata,
  // OFIFO write side
  output logic             of_push,
  output logic [EVW-1:0]   of_wdata,
  input  logic             of_full,
  // IFIFO read side
  output logic             if_pop,
  input  logic [EVW-1:0]   if_rdata,
  input  logic             if_empty,
  // status
  output logic             busy,
  output logic             done,
  output logic [15:0]      count
);
  logic [15:0] remaining;
  logic        dir_q;
  logic        xfer;

  assign xfer     = mst_req && mst_ack;
  assign of_push  = xfer && !dir_q;
  assign of_wdata = mst_rdata;
  assign if_pop   = xfer && dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      dir_q     <= 1'b0;
      remaining <= '0;
      count     <= '0;
      mst_req   <= 1'b0;
      mst_we    <= 1'b0;
      mst_addr  <= '0;
      mst_wdata <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          dir_q     <= dir;
          remaining <= len;
          count     <= '0;
          mst_addr  <= {base[31:2], 2'b00};
        end
      end else if (mst_req) begin
        if (mst_ack) begin
          mst_req   <= 1'b0;
          remaining <= remaining - 1'b1;
          count     <= count + 1'b1;
          mst_addr  <= mst_addr + 32'd4;
        end
      end else if (remaining == 0 || (dir_q && if_empty)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (dir_q) begin
        mst_req   <= 1'b1;
        mst_we    <= 1'b1;
        mst_wdata <= if_rdata;
      end else if (!of_full) begin
        mst_req   <= 1'b1;
        mst_we    <= 1'b0;
      end
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 mst_req && !mst_ack |=> mst_req && $stable(mst_addr) && $stable(mst_we));
  a_no_of_overflow: assert property (@(posedge clk) disable iff (!rst_n) of_push |-> !of_full);
endmodule
