// Shared types and constants of the reconfigurable functional-unit cluster.
//
// A functional unit (FU) performs one of six functions. The enum order is the
// fixed order in which the balanced idle-to-active policy hands idle units to
// active functions: int add, fp add, fp multiply, int multiply, int divide,
// fp divide. The order follows the document; the codes are this design's own.
// Latency tables: the CMOS latencies are this design's choice (typical values
// for a 1 GHz core); the STT-NV latencies follow the document's delay ratios
// (adder 2.89x, rounded up to 3x; multiplier two times deeper); dividers are
// taken as two times deeper as well, which the document does not state.
package rfu_pkg;

  localparam int unsigned XLEN    = 64;   // datapath width (64-bit adder / 64x64 multiplier)
  localparam int unsigned N_FN    = 6;    // number of functions
  localparam int unsigned TAG_W   = 8;    // operation tag carried to write-back
  localparam int unsigned MAX_LAT = 40;   // deepest latency in the tables below

  typedef enum logic [2:0] {
    FN_INT_ADD = 3'd0,
    FN_FP_ADD  = 3'd1,
    FN_FP_MUL  = 3'd2,
    FN_INT_MUL = 3'd3,
    FN_INT_DIV = 3'd4,
    FN_FP_DIV  = 3'd5
  } fn_e;

  // Adaptation algorithm. ALGO_NONE is the unadapted baseline behaviour.
  typedef enum logic [1:0] {
    ALGO_NONE    = 2'd0,
    ALGO_STATIC  = 2'd1,
    ALGO_DYN_BIA = 2'd2,
    ALGO_DYN_BMA = 2'd3
  } algo_e;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [TAG_W-1:0] tag_t;

  // One operation offered to the cluster by the issue stage.
  typedef struct packed {
    logic  valid;
    fn_e   fn;
    logic  subop;   // int add: subtract; fp add: subtract; int div: remainder
    word_t a;
    word_t b;
    tag_t  tag;
  } fu_req_t;

  // One result returned by a unit.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t data;
  } fu_res_t;

  // STT-NV LUT fabric of one reconfigurable unit: 65 four-input LUTs of 16
  // configuration bits each (the adder's LUT count, which bounds the bits that
  // differ between two functions), written over a 128-bit bus; one STT-NV
  // write takes 25 ns, 25 cycles at 1 GHz.
  localparam int unsigned N_LUT     = 65;
  localparam int unsigned LUT_BITS  = 16;
  localparam int unsigned CFG_BITS  = N_LUT * LUT_BITS;               // 1040
  localparam int unsigned BUS_W     = 128;
  localparam int unsigned CFG_WORDS = (CFG_BITS + BUS_W - 1) / BUS_W;  // 9
  localparam int unsigned WRITE_CYC = 25;

  typedef logic [BUS_W-1:0]               cfg_word_t;
  typedef logic [$clog2(CFG_WORDS)-1:0]   cfg_idx_t;

  // Configuration image of function `fn`, word `idx`. LUT 0 (bits 15:0 of
  // word 0) is the header that names the function, 0xC0F in its top 12 bits
  // and the function code in its low 3 bits; a unit reads its function from
  // there. The remaining LUT truth tables are a fixed placeholder pattern,
  // distinct per function and per LUT: tt(fn,k) = ((fn+1)*0x9E37) ^ (k*0x7F4B)
  // ^ (k << 9), 16 bits. Bits past LUT 64 are zero.
  function automatic cfg_word_t cfg_image_word(fn_e fn, cfg_idx_t idx);
    cfg_word_t w;
    int unsigned k;
    logic [15:0] tt;
    w = '0;
    for (int j = 0; j < BUS_W / LUT_BITS; j++) begin
      k = int'(idx) * (BUS_W / LUT_BITS) + j;
      if (k == 0)
        tt = {12'hC0F, 1'b0, fn};
      else
        tt = 16'(((int'(fn) + 1) * 32'h9E37) ^ (k * 32'h7F4B) ^ (k << 9));
      if (k < N_LUT) w[j*LUT_BITS +: LUT_BITS] = tt;
    end
    return w;
  endfunction

  // Latency in cycles from issue to result.
  function automatic int unsigned cmos_latency(fn_e fn);
    case (fn)
      FN_INT_ADD: return 1;
      FN_FP_ADD:  return 2;
      FN_FP_MUL:  return 4;
      FN_INT_MUL: return 3;
      FN_INT_DIV: return 20;
      default:    return 12;  // FN_FP_DIV
    endcase
  endfunction

  function automatic int unsigned stt_latency(fn_e fn);
    case (fn)
      FN_INT_ADD: return 3;   // 2.89x the CMOS adder, rounded up
      FN_FP_ADD:  return 6;
      default:    return 2 * cmos_latency(fn);
    endcase
  endfunction

  // Dividers are not pipelined: one operation at a time.
  function automatic logic fn_unpipelined(fn_e fn);
    return (fn == FN_INT_DIV) || (fn == FN_FP_DIV);
  endfunction

endpackage
