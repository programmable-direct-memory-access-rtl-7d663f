// tb_dma_ahb_master -- self-checking test of the bus engine.
// A queue of transfers stands in for the channels and an AHB memory model
// (tb_ahb_mem) for the system bus.
//  1. 16 word transfers without wait states: the data must arrive and the
//     block must take exactly 2 cycles per transfer (first read address
//     accepted to last write completed).
//  2. 300 random transfers mixing byte and word sources and destinations at
//     random addresses with random wait states: every destination must hold
//     the source value converted as specified (byte to word zero padded,
//     word to byte keeps the low byte).
module tb_dma_ahb_master;
  import dmac_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        gnt_valid = 1'b0, start_ok = 1'b1;
  logic [2:0]  gnt_ch = '0;
  xfer_t       gnt_xfer = '0;
  logic        take, busy;
  logic [2:0]  take_ch;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hmasterlock, hready;
  logic [2:0]  hsize, hburst;
  logic        wait_en = 1'b0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  dma_ahb_master dut (.hclk(clk), .hresetn(rst_n), .gnt_valid, .gnt_ch, .gnt_xfer,
                      .start_ok, .take, .take_ch, .busy, .haddr, .htrans, .hwrite,
                      .hsize, .hburst, .hmasterlock, .hwdata, .hrdata, .hready);

  tb_ahb_mem #(.AW(16)) mem (.clk, .rst_n, .haddr, .htrans, .hwrite, .hsize, .hwdata,
                             .hrdata, .hready, .wait_en);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  xfer_t q [$];
  int    first_take;

  // feed the queue head as the grant; pop on take
  always @(negedge clk) begin
    gnt_valid <= q.size() > 0;
    if (q.size() > 0) gnt_xfer <= q[0];
  end
  always @(posedge clk) begin
    if (take) begin
      if (first_take < 0) first_take = cyc;
      void'(q.pop_front());
    end
  end

  function automatic logic [15:0] expect_val(input xfer_t x, input logic [15:0] srcv);
    logic [15:0] v;
    v = x.srcbyte ? {8'h00, srcv[7:0]} : srcv;
    return x.dstbyte ? {8'h00, v[7:0]} : v;
  endfunction

  initial begin
    xfer_t       xs [$];
    logic [15:0] sv [$];
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1: timing of a 16-transfer block, no wait states
    first_take = -1;
    for (int i = 0; i < 16; i++) begin
      xfer_t x;
      x.src = 20'h01000 + 20'(2 * i); x.dst = 20'h09000 + 20'(2 * i);
      x.srcbyte = 1'b0; x.dstbyte = 1'b0;
      mem.poke16(int'(x.src), 16'hA500 + 16'(i));
      q.push_back(x);
    end
    n0 = mem.n_wr;
    wait (mem.n_wr == n0 + 16);
    checks++;
    if (cyc - first_take != 2 * 16) begin
      failures++; $display("FAIL block took %0d cycles, expected %0d", cyc - first_take, 32);
    end else $display("INFO block of 16 transfers took %0d cycles", cyc - first_take);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (mem.peek16(32'h9000 + 2 * i) !== 16'hA500 + 16'(i)) begin
        failures++; $display("FAIL block word %0d = %h", i, mem.peek16(32'h9000 + 2 * i));
      end
    end

    // ---- 2: random byte/word mixes with wait states
    repeat (5) @(negedge clk);
    wait_en = 1'b1;
    for (int i = 0; i < 300; i++) begin
      xfer_t x;
      logic [15:0] v;
      x.srcbyte = 1'($urandom); x.dstbyte = 1'($urandom);
      // sources below 8000h, destinations above; each destination distinct
      x.src = 20'(16'h1000 + 4 * i + (x.srcbyte ? $urandom_range(0, 3) : 2 * $urandom_range(0, 1)));
      x.dst = 20'(16'h8000 + 4 * i + (x.dstbyte ? $urandom_range(0, 3) : 2 * $urandom_range(0, 1)));
      v = 16'($urandom);
      if (x.srcbyte) mem.poke8(int'(x.src), v[7:0]); else mem.poke16(int'(x.src), v);
      xs.push_back(x); sv.push_back(v);
    end
    n0 = mem.n_wr;
    foreach (xs[i]) q.push_back(xs[i]);
    wait (mem.n_wr == n0 + 300);
    foreach (xs[i]) begin
      logic [15:0] e, got;
      e   = expect_val(xs[i], sv[i]);
      got = xs[i].dstbyte ? {8'h00, mem.peek8(int'(xs[i].dst))} : mem.peek16(int'(xs[i].dst));
      checks++;
      if (got !== e) begin
        failures++;
        if (failures < 10) $display("FAIL xfer %0d src=%h dst=%h sb=%b db=%b got %h exp %h",
                                    i, xs[i].src, xs[i].dst, xs[i].srcbyte, xs[i].dstbyte, got, e);
      end
    end
    checks++;
    if (mem.n_wait == 0) begin failures++; $display("FAIL no wait states were inserted"); end
    repeat (5) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL engine still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
