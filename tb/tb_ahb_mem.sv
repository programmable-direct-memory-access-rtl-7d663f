// tb_ahb_mem -- behavioural AHB slave memory for the testbenches.
// 2**AW bytes, little endian, byte/halfword/word accesses. The address phase
// is registered; the data phase reads or writes the addressed lanes. When
// wait_en is set the memory inserts random wait states (hready low).
// Counters report the reads and writes it completed.
module tb_ahb_mem #(
  parameter int AW = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  input  logic        wait_en
);
  logic [7:0]  mem [2**AW];
  logic        act_q = 1'b0, wr_q = 1'b0, rdy_q = 1'b1;
  logic [31:0] a_q = '0;
  logic [2:0]  sz_q = '0;
  int          n_rd = 0, n_wr = 0, n_wait = 0;

  function automatic logic [31:0] aw(input logic [31:0] a);
    return a & ((32'(1) << AW) - 1);
  endfunction

  always_comb begin
    hready = act_q ? rdy_q : 1'b1;
    hrdata = 32'h0;
    if (act_q && !wr_q)
      for (int b = 0; b < 4; b++) hrdata[8 * b +: 8] = mem[aw({a_q[31:2], 2'(b)})];
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      act_q <= 1'b0;
      rdy_q <= 1'b1;
    end else begin
      rdy_q <= wait_en ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (act_q && !hready) n_wait++;
      if (hready) begin
        if (act_q && wr_q) begin
          n_wr++;
          for (int b = 0; b < 4; b++) begin
            logic en;
            case (sz_q)
              3'b000:  en = (b == int'(a_q[1:0]));
              3'b001:  en = ((b / 2) == int'(a_q[1]));
              default: en = 1'b1;
            endcase
            if (en) mem[aw({a_q[31:2], 2'(b)})] <= hwdata[8 * b +: 8];
          end
        end
        if (act_q && !wr_q) n_rd++;
        act_q <= htrans[1];
        wr_q  <= hwrite;
        a_q   <= haddr;
        sz_q  <= hsize;
      end
    end
  end

  function automatic void poke16(input int a, input logic [15:0] v);
    mem[aw(a)] = v[7:0]; mem[aw(a + 1)] = v[15:8];
  endfunction
  function automatic logic [15:0] peek16(input int a);
    return {mem[aw(a + 1)], mem[aw(a)]};
  endfunction
  function automatic void poke8(input int a, input logic [7:0] v);
    mem[aw(a)] = v;
  endfunction
  function automatic logic [7:0] peek8(input int a);
    return mem[aw(a)];
  endfunction
endmodule
