// Behavioural model of the PCI core's master side together with host memory,
// for testbenches only. A bus-master request is answered after a random
// latency of 0 to MAX_LAT extra cycles with a one-cycle ack; reads return
// the memory word at the request address, writes store into it. Memory is
// an associative array of 32-bit words indexed by byte address; unwritten
// words read as zero. The real part is a PCI bridge core and the host's
// memory, which are not designed here.
module pci_host_model #(
  parameter int MAX_LAT = 3
) (
  input  logic        clk,
  input  logic        mst_req,
  input  logic        mst_we,
  input  logic [31:0] mst_addr,
  input  logic [31:0] mst_wdata,
  output logic        mst_ack,
  output logic [31:0] mst_rdata
);
  logic [31:0] mem [logic [31:0]];
  int reads = 0, writes = 0;
  int wait_cnt = -1;

  initial begin
    mst_ack   = 0;
    mst_rdata = 0;
  end

  always @(posedge clk) begin
    mst_ack <= 0;
    if (mst_req && !mst_ack) begin
      if (wait_cnt < 0) wait_cnt = $urandom_range(0, MAX_LAT);
      if (wait_cnt == 0) begin
        mst_ack <= 1;
        if (mst_we) begin
          mem[mst_addr] = mst_wdata;
          writes++;
        end else begin
          mst_rdata <= mem.exists(mst_addr) ? mem[mst_addr] : 32'h0;
          reads++;
        end
        wait_cnt = -1;
      end else wait_cnt--;
    end
  end
endmodule
