// tb_dma_global_regs -- self-checking test of DMACTL0..4 and the DMAIV read.
// Writes random values with random byte enables into the four words of the
// global block and compares read-back and decoded fields (DMAxTSEL, ENNMI,
// ROUNDROBIN, DMARMWDIS) with a model that masks reserved bits.
module tb_dma_global_regs;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr = 1'b0;
  logic [1:0]  word = '0;
  logic [3:0]  be = '0;
  logic [31:0] wdata = '0;
  logic [15:0] iv = '0;
  logic [31:0] rdata [4];
  logic [7:0][4:0] tsel;
  logic        ennmi, roundrobin, rmwdis;
  int checks = 0, failures = 0;
  logic [15:0] m_ctl [4];
  logic [2:0]  m_ctl4;

  always #5 clk = ~clk;

  dma_global_regs dut (.clk, .rst_n, .wr, .word, .be, .wdata, .iv, .rdata, .tsel,
                       .ennmi, .roundrobin, .rmwdis);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [31:0] e [4];
    e[0] = {m_ctl[1], m_ctl[0]};
    e[1] = {m_ctl[3], m_ctl[2]};
    e[2] = {16'h0, 13'h0, m_ctl4};
    e[3] = {iv, 16'h0};
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (rdata[w] !== e[w]) begin failures++; $display("FAIL word %0d %h exp %h", w, rdata[w], e[w]); end
    end
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (tsel[c] !== m_ctl[c / 2][8 * (c % 2) +: 5]) begin failures++; $display("FAIL tsel %0d", c); end
    end
    checks++;
    if ({rmwdis, roundrobin, ennmi} !== m_ctl4) begin failures++; $display("FAIL ctl4 fields"); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) m_ctl[i] = '0;
    m_ctl4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    compare();
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wr = 1'b1; word = 2'($urandom); be = 4'($urandom); wdata = $urandom;
      iv = 16'($urandom_range(0, 8) * 2);
      // model
      for (int b = 0; b < 4; b++) if (be[b]) begin
        if (word < 2) begin
          int r; r = word * 2 + b / 2;
          m_ctl[r][8 * (b % 2) +: 8] = wdata[8 * b +: 8] & 8'h1F;
        end else if (word == 2 && b == 0) m_ctl4 = wdata[2:0];
      end
      @(negedge clk);
      wr = 1'b0;
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
