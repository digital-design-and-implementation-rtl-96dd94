// npusch_pkg: types, constants and small arithmetic helpers shared by the
// NB-IoT NPUSCH transmitter chain.
//
// Contents:
//  * fixed-point sample types: Q4.8 (12-bit) samples between modulator, DFT
//    and resource element mapper, Q4.10 (14-bit) samples at the 128-point IFFT;
//  * the 32-column inter-column permutation of the rate-matching sub-block
//    interleaver (3GPP TS 36.212 Table 5.1.4-1);
//  * the decode of the subcarrier indication field I_sc into the number of
//    subcarriers, the first subcarrier and the number of slots per resource
//    unit (15 kHz spacing, NPUSCH format 1);
//  * the 128-point IFFT twiddle ROM. Entry e holds
//    round(16384*cos(2*pi*e/128)) + j*round(16384*sin(2*pi*e/128)), e = 0..63,
//    i.e. W^(-e) of a 128-point DFT in Q1.14, as needed by an inverse transform;
//  * a shift-and-add multiply by sqrt(3)/2 used by the radix-3 butterfly and the
//    12-point DFT twiddles, so that no general multiplier is needed there.
package npusch_pkg;

  // ---------------------------------------------------------------- samples
  typedef logic signed [11:0] s12_t;   // Q4.8
  typedef logic signed [13:0] s14_t;   // Q4.10

  typedef struct packed {
    s12_t re;
    s12_t im;
  } cplx12_t;

  typedef struct packed {
    s14_t re;
    s14_t im;
  } cplx14_t;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } tw16_t;

  // +-1/sqrt(2) in Q4.8: 0000_1011_0101 = 181/256 = 0.7070
  localparam s12_t MOD_AMP = 12'sd181;

  // ---------------------------------------------------------------- chain constants
  localparam int unsigned CRC_LEN      = 24;     // CRC24A parity bits
  localparam int unsigned TAIL_LEN     = 4;      // trellis termination bits per stream
  localparam int unsigned C_SUBBLOCK   = 32;     // sub-block interleaver columns
  localparam int unsigned NC_SCRAMBLE  = 1600;   // gold sequence offset N_c
  localparam int unsigned N_SYMB_UL    = 7;      // SC-FDMA symbols per slot (15 kHz)
  localparam int unsigned N_SC_UL      = 12;     // subcarriers of the NB-IoT carrier
  localparam int unsigned N_FFT        = 128;    // IFFT size
  localparam int unsigned DFT_W        = 20;     // DFT internal width, Q8.12

  // Modulation order Q_m (1 = BPSK, 2 = QPSK)
  typedef enum logic [1:0] {
    QM_BPSK = 2'd1,
    QM_QPSK = 2'd2
  } qm_e;

  // Inter-column permutation P(j) of the sub-block interleaver, C = 32.
  function automatic logic [4:0] sbi_perm(input logic [4:0] j);
    // P(j) is the 5-bit bit reversal of j
    return {j[0], j[1], j[2], j[3], j[4]};
  endfunction

  // Resource unit allocation decoded from I_sc (15 kHz spacing).
  typedef struct packed {
    logic [3:0] nsc;       // subcarriers per resource unit: 1, 3, 6 or 12
    logic [3:0] sc_start;  // first allocated subcarrier
    logic [4:0] n_slots;   // slots per resource unit: 16, 8, 4 or 2
    logic       valid;     // 0 for the reserved values 19..63
  } ru_alloc_t;

  function automatic ru_alloc_t isc_decode(input logic [5:0] i_sc);
    ru_alloc_t a;
    a = '0;
    a.valid = 1'b1;
    if (i_sc < 6'd12) begin
      a.nsc = 4'd1;  a.sc_start = i_sc[3:0];              a.n_slots = 5'd16;
    end else if (i_sc < 6'd16) begin
      a.nsc = 4'd3;  a.sc_start = 4'(6'd3 * (i_sc - 6'd12)); a.n_slots = 5'd8;
    end else if (i_sc < 6'd18) begin
      a.nsc = 4'd6;  a.sc_start = 4'(6'd6 * (i_sc - 6'd16)); a.n_slots = 5'd4;
    end else if (i_sc == 6'd18) begin
      a.nsc = 4'd12; a.sc_start = 4'd0;                   a.n_slots = 5'd2;
    end else begin
      a.valid = 1'b0;
    end
    return a;
  endfunction

  // Upper-layer configuration of one NPUSCH transport block transmission.
  typedef struct packed {
    logic [11:0] tbs;        // transport block size A
    logic [1:0]  qm;         // modulation order, 1 = BPSK, 2 = QPSK
    logic [11:0] g;          // coded bits available for the transport block
    logic [1:0]  rv_idx;     // redundancy version 0..3
    logic [5:0]  i_sc;       // subcarrier indication field 0..18
    logic [2:0]  dmrs_sym;   // SC-FDMA symbol of each slot holding the DMRS
    logic [15:0] n_rnti;     // radio network temporary identifier
    logic [9:0]  n_f;        // system frame number
    logic [9:0]  n_s;        // slot number in the radio frame, 0..19
    logic [15:0] n_id_ncell; // narrowband physical cell identity, 0..503
  } npusch_cfg_t;

  // Rate-matching output length E = N_L * Q_m * floor(G / (N_L * Q_m)) with
  // N_L = 1 and a single code block (C = 1).
  function automatic logic [11:0] rm_out_len(input logic [11:0] g, input logic [1:0] qm);
    return (qm == 2'd2) ? {g[11:1], 1'b0} : g;
  endfunction

  // x * sqrt(3)/2 by shifts and adds: 0.8657 = 1/2+1/4+1/16+1/32+1/64+1/256+1/512+1/2048
  function automatic logic signed [DFT_W-1:0] mul_s60(input logic signed [DFT_W-1:0] x);
    return (x >>> 1) + (x >>> 2) + (x >>> 4) + (x >>> 5) + (x >>> 6) + (x >>> 8) + (x >>> 9) + (x >>> 11);
  endfunction

  // 128-point IFFT twiddle W^(-e), Q1.14
  function automatic tw16_t ifft_twiddle(input logic [5:0] e);
    tw16_t tw;
    unique case (e)
      6'd0: tw = '{re: 16'sd16384, im: 16'sd0};
      6'd1: tw = '{re: 16'sd16364, im: 16'sd804};
      6'd2: tw = '{re: 16'sd16305, im: 16'sd1606};
      6'd3: tw = '{re: 16'sd16207, im: 16'sd2404};
      6'd4: tw = '{re: 16'sd16069, im: 16'sd3196};
      6'd5: tw = '{re: 16'sd15893, im: 16'sd3981};
      6'd6: tw = '{re: 16'sd15679, im: 16'sd4756};
      6'd7: tw = '{re: 16'sd15426, im: 16'sd5520};
      6'd8: tw = '{re: 16'sd15137, im: 16'sd6270};
      6'd9: tw = '{re: 16'sd14811, im: 16'sd7005};
      6'd10: tw = '{re: 16'sd14449, im: 16'sd7723};
      6'd11: tw = '{re: 16'sd14053, im: 16'sd8423};
      6'd12: tw = '{re: 16'sd13623, im: 16'sd9102};
      6'd13: tw = '{re: 16'sd13160, im: 16'sd9760};
      6'd14: tw = '{re: 16'sd12665, im: 16'sd10394};
      6'd15: tw = '{re: 16'sd12140, im: 16'sd11003};
      6'd16: tw = '{re: 16'sd11585, im: 16'sd11585};
      6'd17: tw = '{re: 16'sd11003, im: 16'sd12140};
      6'd18: tw = '{re: 16'sd10394, im: 16'sd12665};
      6'd19: tw = '{re: 16'sd9760, im: 16'sd13160};
      6'd20: tw = '{re: 16'sd9102, im: 16'sd13623};
      6'd21: tw = '{re: 16'sd8423, im: 16'sd14053};
      6'd22: tw = '{re: 16'sd7723, im: 16'sd14449};
      6'd23: tw = '{re: 16'sd7005, im: 16'sd14811};
      6'd24: tw = '{re: 16'sd6270, im: 16'sd15137};
      6'd25: tw = '{re: 16'sd5520, im: 16'sd15426};
      6'd26: tw = '{re: 16'sd4756, im: 16'sd15679};
      6'd27: tw = '{re: 16'sd3981, im: 16'sd15893};
      6'd28: tw = '{re: 16'sd3196, im: 16'sd16069};
      6'd29: tw = '{re: 16'sd2404, im: 16'sd16207};
      6'd30: tw = '{re: 16'sd1606, im: 16'sd16305};
      6'd31: tw = '{re: 16'sd804, im: 16'sd16364};
      6'd32: tw = '{re: 16'sd0, im: 16'sd16384};
      6'd33: tw = '{re: -16'sd804, im: 16'sd16364};
      6'd34: tw = '{re: -16'sd1606, im: 16'sd16305};
      6'd35: tw = '{re: -16'sd2404, im: 16'sd16207};
      6'd36: tw = '{re: -16'sd3196, im: 16'sd16069};
      6'd37: tw = '{re: -16'sd3981, im: 16'sd15893};
      6'd38: tw = '{re: -16'sd4756, im: 16'sd15679};
      6'd39: tw = '{re: -16'sd5520, im: 16'sd15426};
      6'd40: tw = '{re: -16'sd6270, im: 16'sd15137};
      6'd41: tw = '{re: -16'sd7005, im: 16'sd14811};
      6'd42: tw = '{re: -16'sd7723, im: 16'sd14449};
      6'd43: tw = '{re: -16'sd8423, im: 16'sd14053};
      6'd44: tw = '{re: -16'sd9102, im: 16'sd13623};
      6'd45: tw = '{re: -16'sd9760, im: 16'sd13160};
      6'd46: tw = '{re: -16'sd10394, im: 16'sd12665};
      6'd47: tw = '{re: -16'sd11003, im: 16'sd12140};
      6'd48: tw = '{re: -16'sd11585, im: 16'sd11585};
      6'd49: tw = '{re: -16'sd12140, im: 16'sd11003};
      6'd50: tw = '{re: -16'sd12665, im: 16'sd10394};
      6'd51: tw = '{re: -16'sd13160, im: 16'sd9760};
      6'd52: tw = '{re: -16'sd13623, im: 16'sd9102};
      6'd53: tw = '{re: -16'sd14053, im: 16'sd8423};
      6'd54: tw = '{re: -16'sd14449, im: 16'sd7723};
      6'd55: tw = '{re: -16'sd14811, im: 16'sd7005};
      6'd56: tw = '{re: -16'sd15137, im: 16'sd6270};
      6'd57: tw = '{re: -16'sd15426, im: 16'sd5520};
      6'd58: tw = '{re: -16'sd15679, im: 16'sd4756};
      6'd59: tw = '{re: -16'sd15893, im: 16'sd3981};
      6'd60: tw = '{re: -16'sd16069, im: 16'sd3196};
      6'd61: tw = '{re: -16'sd16207, im: 16'sd2404};
      6'd62: tw = '{re: -16'sd16305, im: 16'sd1606};
      6'd63: tw = '{re: -16'sd16364, im: 16'sd804};      default: tw = '0;
    endcase
    return tw;
  endfunction

endpackage
