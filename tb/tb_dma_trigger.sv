// tb_dma_trigger -- self-checking test of the trigger circuit.
// Random trigger lines and random DMAxTSEL changes; a reference model of the
// selected line, delayed one and two cycles, predicts trig_edge and
// trig_level, including software requests.
module tb_dma_trigger;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] trig = '0;
  logic [4:0]  tsel = '0;
  logic        sw_req = 1'b0;
  logic        trig_edge, trig_level;
  int checks = 0, failures = 0, edges = 0;

  always #5 clk = ~clk;

  dma_trigger dut (.clk, .rst_n, .trig_i(trig), .tsel, .sw_req, .trig_edge, .trig_level);

  // reference: selected line seen at the last two clock edges
  logic m1 = 1'b0, m2 = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) begin m1 <= 1'b0; m2 <= 1'b0; end
    else begin m1 <= trig[tsel]; m2 <= m1; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check outputs for the state after the last edge
      checks++;
      if (trig_edge !== ((m1 & ~m2) | sw_req) || trig_level !== (m1 | sw_req)) begin
        failures++;
        $display("FAIL cycle %0d: edge=%b level=%b exp %b %b", i, trig_edge, trig_level,
                 (m1 & ~m2) | sw_req, m1 | sw_req);
      end
      if (trig_edge && !sw_req) edges++;
      // new stimulus
      for (int b = 0; b < 32; b++) if ($urandom_range(0, 7) == 0) trig[b] = ~trig[b];
      if ($urandom_range(0, 49) == 0) tsel = 5'($urandom);
      sw_req = ($urandom_range(0, 29) == 0);
    end
    checks++;
    if (edges < 20) begin failures++; $display("FAIL: too few edges %0d", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
