// cal_pkg: sizes, constants and state types of the foreground gain
// calibration of a 12-bit, 1.5 bit per stage pipelined ADC.
//
// For calibration the ADC is run as a 15-bit converter: stages 1..11 (the
// stages of the 12-bit ADC that carry gain error), two extra ideal stages 12
// and 13, and an ideal 2-bit flash as stage 14. When stage i is calibrated the
// reference VrefH is applied to stage i and the redundancy-removed bits
// D_i..D_15 (16-i bits) are stored; over i = 11..1 that is 5+6+...+15 = 110
// bits. Bits are stored per stage, stage 11 first, each group in read order
// D_15 first.
package cal_pkg;
  import fp21_pkg::*;

  localparam int N_CALI      = 15;          // bits of the calibration ADC
  localparam int N_STAGES    = N_CALI - 1;  // 13 pipelined stages + 2-bit flash
  localparam int N_CAL_STG   = 11;          // stages that get a weight by LMS
  localparam int N_WEIGHTS   = 14;          // w1..w14 kept in memory
  localparam int N_BITS_MEM  = 110;         // calibration bits kept in memory
  localparam int BIT_AW      = 7;           // address width of the bit store
  localparam int STG_W       = 4;           // width of a stage / bit index

  // VrefH = +1.0 V and LSB/4 = (2*VrefH / 2^12) / 4 = 2^-13 V.
  localparam fp21_t VREFH_FP      = FP_ONE;
  localparam fp21_t QUARTER_LSB_FP = '{sign: 1'b0, exp: 6'(BIAS - 13), man: 14'd0};

  // First address of the bit group of stage i: the groups of stages
  // i+1..N_CAL_STG come before it, stage j holding N_CALI+1-j bits.
  function automatic int unsigned bit_base(int unsigned i);
    int unsigned s;
    s = 0;
    for (int unsigned j = 1; j <= N_CAL_STG; j++)
      if (j > i) s += N_CALI + 1 - j;
    return s;
  endfunction

  // Address of bit D_k of the group of stage i (k = 15 .. i).
  function automatic logic [BIT_AW-1:0] bit_addr(int unsigned i, int unsigned k);
    return BIT_AW'(bit_base(i) + N_CALI - k);
  endfunction

  typedef enum logic [3:0] {
    C_RESET, C_READ, C_CALC_VBE, C_CALC_VTOT, C_CALC_VERR,
    C_COMPARE_VERR, C_UPDATE_W, C_MEM_WRITE, C_CALI_DONE
  } cal_state_t;

endpackage
