// dma_ahb_slave -- AHB slave port for the register file.
//
// The CPU programs the controller through this port. A transfer is taken in
// its address phase (hsel, htrans NONSEQ or SEQ, hready high); haddr, hwrite
// and hsize are registered, and in the following data phase the port issues
// one strobe to the register file: reg_wr with hwdata and byte enables, or
// reg_rd while hrdata returns reg_rdata. The port never inserts wait states
// and always answers OKAY.
// Byte enables come from hsize and the low address bits (little endian):
// a byte access enables one lane, a halfword two, a word all four.
// The AHB signal set follows the controller's pin diagram; hwrite, hready,
// hreadyout and hresp are added because an AHB slave needs them, and the
// zero-wait-state, registered-address design is this design's choice.
module dma_ahb_slave #(
  parameter int unsigned RA_W = 8    // register address bits decoded
) (
  input  logic            hclk,
  input  logic            hresetn,
  input  logic            hsel,
  input  logic [31:0]     haddr,
  input  logic [1:0]      htrans,
  input  logic            hwrite,
  input  logic [2:0]      hsize,
  input  logic [31:0]     hwdata,
  input  logic            hready,
  output logic            hreadyout,
  output logic [1:0]      hresp,
  output logic [31:0]     hrdata,
  // register side
  output logic            reg_wr,
  output logic            reg_rd,
  output logic [RA_W-1:2] reg_addr,
  output logic [3:0]      reg_be,
  output logic [31:0]     reg_wdata,
  input  logic [31:0]     reg_rdata
);

  logic            act_q, wr_q;
  logic [RA_W-1:2] addr_q;
  logic [3:0]      be_q;
  logic [3:0]      be_d;

  always_comb begin
    unique case (hsize)
      3'b000:  be_d = 4'b0001 << haddr[1:0];
      3'b001:  be_d = haddr[1] ? 4'b1100 : 4'b0011;
      default: be_d = 4'b1111;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      act_q  <= 1'b0;
      wr_q   <= 1'b0;
      addr_q <= '0;
      be_q   <= '0;
    end else if (hready) begin
      act_q  <= hsel & htrans[1];
      wr_q   <= hwrite;
      addr_q <= haddr[RA_W-1:2];
      be_q   <= be_d;
    end
  end

  always_comb begin
    hreadyout = 1'b1;
    hresp     = 2'b00;
    reg_wr    = act_q & wr_q;
    reg_rd    = act_q & ~wr_q;
    reg_addr  = addr_q;
    reg_be    = be_q;
    reg_wdata = hwdata;
    hrdata    = reg_rd ? reg_rdata : 32'h0;
  end

endmodule
