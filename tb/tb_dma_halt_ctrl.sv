// tb_dma_halt_ctrl -- self-checking test of the halt / start / NMI logic.
// Exhaustive sweep of any_req, engine_busy, DMARMWDIS and cpu_rmw against the
// rules: the CPU is halted at once unless DMARMWDIS holds the start back
// during a read-modify-write, and never released while the engine is busy.
// Then NMI edges with ENNMI on and off.
module tb_dma_halt_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic any_req = 0, engine_busy = 0, rmwdis = 0, cpu_rmw = 0, ennmi = 0, nmi = 0;
  logic start_ok, halt_cpu, cpu_run, nmi_abort;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dma_halt_ctrl dut (.clk, .rst_n, .any_req, .engine_busy, .rmwdis, .cpu_rmw, .ennmi,
                     .nmi, .start_ok, .halt_cpu, .cpu_run, .nmi_abort);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pulses;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 16; v++) begin
      {any_req, engine_busy, rmwdis, cpu_rmw} = 4'(v);
      #1;
      checks++;
      if (halt_cpu !== (engine_busy || (any_req && !(rmwdis && cpu_rmw))) ||
          cpu_run !== !halt_cpu ||
          start_ok !== (engine_busy || !(rmwdis && cpu_rmw))) begin
        failures++;
        $display("FAIL v=%b halt=%b start=%b", 4'(v), halt_cpu, start_ok);
      end
    end
    // NMI: one pulse per rising edge when enabled, none when disabled
    for (int en = 0; en < 2; en++) begin
      ennmi = en[0]; pulses = 0;
      @(negedge clk); nmi = 1'b1;
      repeat (5) begin @(negedge clk); if (nmi_abort) pulses++; end
      nmi = 1'b0;
      repeat (3) begin @(negedge clk); if (nmi_abort) pulses++; end
      checks++;
      if (pulses != en) begin failures++; $display("FAIL ennmi=%0d pulses=%0d", en, pulses); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
