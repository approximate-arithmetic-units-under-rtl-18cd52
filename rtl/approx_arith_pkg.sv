// approx_arith_pkg: names and configurations shared by the approximate
// arithmetic units and the top level that holds them side by side.
//
// The study compares thirteen 16-bit adders and five 16x16 multipliers. Each
// adder and multiplier has an index in the enums below, which is also its
// position in the output arrays of arith_top. The GeAr(N, R, P) settings of
// the five approximate adder families are the study's own numbers; the enum
// order and the record layout are this design's choice.
package approx_arith_pkg;

  localparam int unsigned OP_W   = 16;          // operand width of every unit
  localparam int unsigned SUM_W  = OP_W + 1;    // sum with carry out
  localparam int unsigned PROD_W = 2 * OP_W;    // full product

  // The thirteen adders: ten approximate (five GeAr settings, each with
  // '+' sub-adders "_GEN" or ripple-carry sub-adders "_RCA") and three exact.
  typedef enum logic [3:0] {
    ADD_ACAI_GEN  = 4'd0,
    ADD_ACAI_RCA  = 4'd1,
    ADD_ACAII_GEN = 4'd2,
    ADD_ACAII_RCA = 4'd3,
    ADD_GEAR2_GEN = 4'd4,
    ADD_GEAR2_RCA = 4'd5,
    ADD_GEAR4_GEN = 4'd6,
    ADD_GEAR4_RCA = 4'd7,
    ADD_GEAR6_GEN = 4'd8,
    ADD_GEAR6_RCA = 4'd9,
    ADD_RCA       = 4'd10,
    ADD_KSA       = 4'd11,
    ADD_PLUS      = 4'd12
  } adder_e;
  localparam int unsigned NUM_ADDERS = 13;
  localparam int unsigned NUM_GEAR   = 10;  // approximate adders come first

  // The five multipliers: four share the recursive 2x2-block structure,
  // the last one is written as a * b.
  typedef enum logic [2:0] {
    MUL_MULT16       = 3'd0,
    MUL_UDM16        = 3'd1,
    MUL_UDM16_SFA    = 3'd2,
    MUL_UDM16_SFA_SW = 3'd3,
    MUL_STAR         = 3'd4
  } mult_e;
  localparam int unsigned NUM_MULTS  = 5;
  localparam int unsigned NUM_BLOCKM = 4;   // multipliers built from 2x2 blocks

  // One GeAr(N, R, P) setting with its sub-adder style.
  typedef struct packed {
    logic [4:0] r;        // result bits per sub-adder
    logic [4:0] p;        // carry-prediction bits per sub-adder
    logic       sub_rca;  // 1: ripple-carry sub-adders, 0: '+' sub-adders
  } gear_cfg_t;

  // Settings of the ten approximate adders, indexed like adder_e.
  function automatic gear_cfg_t gear_cfg(int unsigned idx);
    gear_cfg_t c;
    case (idx / 2)
      0:       begin c.r = 5'd1; c.p = 5'd7; end  // ACA-I   = GeAr(16,1,7)
      1:       begin c.r = 5'd4; c.p = 5'd4; end  // ACA-II  = GeAr(16,4,4)
      2:       begin c.r = 5'd2; c.p = 5'd8; end  // GeAr2   = GeAr(16,2,8)
      3:       begin c.r = 5'd4; c.p = 5'd8; end  // GeAr4   = GeAr(16,4,8)
      default: begin c.r = 5'd6; c.p = 5'd8; end  // GeAr6   = GeAr(16,6,8)
    endcase
    c.sub_rca = (idx % 2) == 1;
    return c;
  endfunction

  // Structure switches of the four block multipliers, indexed like mult_e.
  typedef struct packed {
    logic approx;   // under-designed 2x2 blocks outside the exact HH paths
    logic sfa;      // one simplified full adder per partial-sum addition
    logic sw_form;  // full-width partial-sum adders (software-model form)
  } mult_cfg_t;

  function automatic mult_cfg_t mult_cfg(int unsigned idx);
    case (idx)
      0:       return '{approx: 1'b0, sfa: 1'b0, sw_form: 1'b0};  // Mult16
      1:       return '{approx: 1'b1, sfa: 1'b0, sw_form: 1'b0};  // UDM16
      2:       return '{approx: 1'b1, sfa: 1'b1, sw_form: 1'b0};  // UDM16_SFA
      default: return '{approx: 1'b1, sfa: 1'b1, sw_form: 1'b1};  // UDM16_SFA_SW
    endcase
  endfunction

endpackage
