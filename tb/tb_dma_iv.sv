// tb_dma_iv -- self-checking test of the interrupt vector.
// All 65536 combinations of DMAIFG and DMAIE flags are applied with and
// without an access; the expected DMAIV value 2*(k+1) of the lowest-numbered
// enabled pending channel k, the combined request and the one-hot clear are
// worked out from the vector table.
module tb_dma_iv;
  logic [7:0]  ifg, ie, clr;
  logic        access, irq;
  logic [15:0] iv;
  int checks = 0, failures = 0;

  dma_iv dut (.ifg, .ie, .access, .iv, .clr, .irq);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_iv;
    logic [7:0]  exp_clr;
    for (int v = 0; v < 65536; v++) begin
      ifg = v[7:0]; ie = v[15:8]; access = v[0] ^ v[9];
      #1;
      exp_iv = 16'h0; exp_clr = '0;
      begin : find
        for (int k = 0; k < 8; k++)
          if (ifg[k] && ie[k]) begin exp_iv = 16'(2 * k + 2); exp_clr[k] = access; disable find; end
      end
      checks++;
      if (iv !== exp_iv || clr !== exp_clr || irq !== (exp_iv != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL ifg=%b ie=%b acc=%b iv=%h exp %h clr=%b exp %b",
                                    ifg, ie, access, iv, exp_iv, clr, exp_clr);
      end
    end
    // spot values from the vector table
    ifg = 8'h80; ie = 8'hFF; access = 1'b0; #1;
    checks++; if (iv !== 16'h0010) begin failures++; $display("FAIL ch7 vector %h", iv); end
    ifg = 8'h05; ie = 8'hFE; #1;
    checks++; if (iv !== 16'h0006) begin failures++; $display("FAIL disabled ch0 %h", iv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
