// tb_dma_arbiter -- self-checking test of fixed and round-robin priority.
// Random request and hold vectors; the reference picks the lowest requesting
// channel (fixed) or the first after the last served one (round robin),
// restricted to held channels while any held channel requests.
module tb_dma_arbiter;
  localparam int N = 8;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req = '0, hold = '0;
  logic         rr_en = 1'b0, take = 1'b0;
  logic [2:0]   take_ch = '0;
  logic         gnt_valid;
  logic [2:0]   gnt_ch;
  int checks = 0, failures = 0;
  int last = N - 1;

  always #5 clk = ~clk;

  dma_arbiter dut (.clk, .rst_n, .req, .hold, .rr_en, .take, .take_ch, .gnt_valid, .gnt_ch);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_pick(input logic [N-1:0] r, input logic [N-1:0] h,
                                  input logic rr, input int lst);
    logic [N-1:0] e;
    e = (|(r & h)) ? (r & h) : r;
    if (e == 0) return -1;
    if (!rr) begin
      for (int i = 0; i < N; i++) if (e[i]) return i;
    end else begin
      for (int k = 1; k <= N; k++) if (e[(lst + k) % N]) return (lst + k) % N;
    end
    return -1;
  endfunction

  initial begin
    int exp_ch;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 1000 == 0) rr_en = (i / 1000) % 2 == 1;
      req  = N'($urandom);
      hold = ($urandom_range(0, 3) == 0) ? N'($urandom) : '0;
      #1;
      exp_ch = ref_pick(req, hold, rr_en, last);
      checks++;
      if (gnt_valid !== (exp_ch >= 0) || (exp_ch >= 0 && gnt_ch !== 3'(exp_ch))) begin
        failures++;
        $display("FAIL i=%0d req=%b hold=%b rr=%b last=%0d got %b/%0d exp %0d",
                 i, req, hold, rr_en, last, gnt_valid, gnt_ch, exp_ch);
      end
      take    = gnt_valid && ($urandom_range(0, 3) != 0);
      take_ch = gnt_ch;
      @(posedge clk);
      if (take && rr_en) last = take_ch;
      #1 take = 1'b0;
    end
    // directed: with three steady requesters, round robin serves each of
    // them once in any three consecutive transfers; fixed serves only 0
    for (int mode = 0; mode < 2; mode++) begin
      logic [N-1:0] served;
      served = '0;
      @(negedge clk);
      rr_en = (mode == 1); req = 8'b1000_0101; hold = '0;
      for (int k = 0; k < 3; k++) begin
        #1;
        served[gnt_ch] = 1'b1;
        take = 1'b1; take_ch = gnt_ch;
        @(posedge clk); if (rr_en) last = take_ch; #1 take = 1'b0;
        @(negedge clk);
      end
      checks++;
      if (served !== (mode == 1 ? 8'b1000_0101 : 8'b0000_0001)) begin
        failures++; $display("FAIL directed mode %0d served %b", mode, served);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
