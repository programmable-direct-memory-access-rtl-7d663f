// tb_dma_ahb_slave -- self-checking test of the register-side AHB slave.
// A small register array behind the port is written and read with random
// byte, halfword and word transfers, back to back and with idle cycles,
// deselected transfers and hready held low by another slave. A byte-level
// model predicts every read.
module tb_dma_ahb_slave;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hsel = 0, hwrite = 0, hready = 1;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = '0, hresp;
  logic [2:0]  hsize = '0;
  logic        hreadyout;
  logic        reg_wr, reg_rd;
  logic [7:2]  reg_addr;
  logic [3:0]  reg_be;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [64];
  logic [7:0]  model [256];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0;

  always #5 clk = ~clk;

  dma_ahb_slave dut (.hclk(clk), .hresetn(rst_n), .hsel, .haddr, .htrans,
    .hwrite, .hsize, .hwdata, .hready, .hreadyout, .hresp, .hrdata,
    .reg_wr, .reg_rd, .reg_addr, .reg_be, .reg_wdata, .reg_rdata);

  // register file behind the port
  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) begin
    if (reg_wr) begin
      n_wr++;
      for (int b = 0; b < 4; b++) if (reg_be[b]) regs[reg_addr][8 * b +: 8] <= reg_wdata[8 * b +: 8];
    end
    if (reg_rd) n_rd++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pending data phase, as the bus master sees it
  logic        p_act = 0, p_wr = 0;
  logic [7:0]  p_a = 0;
  logic [2:0]  p_sz = 0;
  logic [31:0] p_wd = 0;

  initial begin
    for (int i = 0; i < 64; i++) regs[i] = '0;
    for (int i = 0; i < 256; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // data phase of the previous transfer: write data / check read data
      if (p_act) begin
        if (p_wr) begin
          hwdata = $urandom;
          for (int b = 0; b < 4; b++)
            if ((p_sz == 0 && b == p_a[1:0]) || (p_sz == 1 && b / 2 == p_a[1]) || p_sz == 2)
              model[{p_a[7:2], 2'(b)}] = hwdata[8 * b +: 8];
        end else begin
          logic [31:0] e;
          for (int b = 0; b < 4; b++) e[8 * b +: 8] = model[{p_a[7:2], 2'(b)}];
          #1;
          checks++;
          if (hrdata !== e) begin failures++; $display("FAIL read %h got %h exp %h", p_a, hrdata, e); end
        end
      end
      // another slave stretching its data phase: nothing may be sampled
      hready = p_act ? 1'b1 : ($urandom_range(0, 4) != 0);
      // new address phase
      hsel   = ($urandom_range(0, 7) != 0);
      htrans = ($urandom_range(0, 4) == 0) ? 2'b00 : 2'b10;
      hwrite = 1'($urandom);
      hsize  = 3'($urandom_range(0, 2));
      haddr  = {24'h0, 8'($urandom)};
      if (hsize == 1) haddr[0] = 1'b0;
      if (hsize == 2) haddr[1:0] = 2'b00;
      @(posedge clk);
      if (hready) begin
        p_act = hsel && htrans[1]; p_wr = hwrite; p_a = haddr[7:0]; p_sz = hsize;
      end else p_act = 1'b0;
    end
    checks++;
    if (n_wr < 500 || n_rd < 500) begin failures++; $display("FAIL too few accesses"); end
    checks++;
    if (hreadyout !== 1'b1 || hresp !== 2'b00) begin failures++; $display("FAIL response"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
