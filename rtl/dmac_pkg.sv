// dmac_pkg -- types and constants shared by the eight-channel DMA controller.
//
// The channel control word (DMAxCTL) is modelled as a packed struct whose bit
// positions follow the register description of the controller: DMADT in 14:12,
// DMADSTINCR in 11:10, DMASRCINCR in 9:8, DMADSTBYTE 7, DMASRCBYTE 6,
// DMALEVEL 5, DMAEN 4, DMAIFG 3, DMAIE 2, DMAABORT 1 and DMAREQ 0.
// Addresses are 20 bits wide as in the DMAxSA/DMAxDA registers; a "word" is
// 16 bits, which is why a word transfer steps the address by two.
// The AHB encodings are those of the AMBA 2.0 specification. The burst-block
// interleave (two CPU cycles after every four transfers) is given by the
// controller description; the AHB master ID is this design's own choice.
package dmac_pkg;

  localparam int unsigned NCH      = 8;   // channels
  localparam int unsigned NTRIG    = 32;  // trigger lines per channel
  localparam int unsigned TSEL_W   = 5;   // DMAxTSEL width
  localparam int unsigned ADDR_W   = 20;  // DMAxSA / DMAxDA width
  localparam int unsigned CH_W     = 3;   // channel number width

  localparam int unsigned BURST_LEN = 4;  // transfers per burst before the CPU slot
  localparam int unsigned CPU_SLOT  = 2;  // CPU cycles granted after each burst

  // DMADT transfer modes
  typedef enum logic [2:0] {
    DT_SINGLE   = 3'b000,
    DT_BLOCK    = 3'b001,
    DT_BURST    = 3'b010,
    DT_BURST_B  = 3'b011,
    DT_RSINGLE  = 3'b100,
    DT_RBLOCK   = 3'b101,
    DT_RBURST   = 3'b110,
    DT_RBURST_B = 3'b111
  } dmadt_e;

  // DMASRCINCR / DMADSTINCR address step
  typedef enum logic [1:0] {
    INC_NONE   = 2'b00,
    INC_NONE_B = 2'b01,
    INC_DEC    = 2'b10,
    INC_INC    = 2'b11
  } incr_e;

  typedef struct packed {
    logic   rsvd;     // 15, reads 0
    dmadt_e dmadt;    // 14:12
    incr_e  dstincr;  // 11:10
    incr_e  srcincr;  // 9:8
    logic   dstbyte;  // 7
    logic   srcbyte;  // 6
    logic   level;    // 5
    logic   en;       // 4
    logic   ifg;      // 3
    logic   ie;       // 2
    logic   abrt;     // 1, DMAABORT
    logic   req;      // 0, self-clearing
  } dmactl_t;

  // One transfer as handed from a channel to the bus engine
  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    logic              srcbyte;
    logic              dstbyte;
  } xfer_t;

  // AHB encodings
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [2:0] HSIZE_BYTE    = 3'b000;
  localparam logic [2:0] HSIZE_HALF    = 3'b001;
  localparam logic [2:0] HBURST_SINGLE = 3'b000;

  // Block-type modes (block and burst-block, repeated or not)
  function automatic logic is_block(input dmadt_e dt);
    return dt[1:0] != 2'b00;
  endfunction

  function automatic logic is_burst(input dmadt_e dt);
    return dt[1];
  endfunction

  function automatic logic is_repeated(input dmadt_e dt);
    return dt[2];
  endfunction

  // Next address after one transfer: +-1 for bytes, +-2 for words
  function automatic logic [ADDR_W-1:0] step_addr(input logic [ADDR_W-1:0] a,
                                                  input incr_e inc,
                                                  input logic isbyte);
    logic [ADDR_W-1:0] d;
    d = isbyte ? ADDR_W'(1) : ADDR_W'(2);
    case (inc)
      INC_INC: return a + d;
      INC_DEC: return a - d;
      default: return a;
    endcase
  endfunction

  // Merge a 16-bit write into a register under two byte enables
  function automatic logic [15:0] merge16(input logic [15:0] old,
                                          input logic [15:0] wd,
                                          input logic [1:0]  be);
    return {be[1] ? wd[15:8] : old[15:8], be[0] ? wd[7:0] : old[7:0]};
  endfunction

endpackage
