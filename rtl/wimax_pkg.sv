// wimax_pkg: types, constants and small functions shared by the OFDMA-TDD PHY datapath.
// Complex baseband samples are 16-bit signed I/Q pairs (the 16x2 buses between tasks).
// Constellation points use a unit level of 2^14 scaled by the usual 1/sqrt(2), 1/sqrt(10)
// and 1/sqrt(42) normalisation; the bit labels follow a Gray mapping (sign bit first).
// Angles are binary angles: 2^15 is pi for 16-bit angles, 2^32 is 2*pi for phase accumulators.
package wimax_pkg;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  typedef enum logic [1:0] {MOD_QPSK = 2'd0, MOD_16QAM = 2'd1, MOD_64QAM = 2'd2} mod_t;
  typedef enum logic [1:0] {RATE_1_2 = 2'd0, RATE_2_3 = 2'd1, RATE_3_4 = 2'd2} rate_t;


  // TDD frame layout in samples (configuration registers).
  typedef struct packed {
    logic [19:0] dl_len;
    logic [19:0] ttg_len;
    logic [19:0] ul_len;
    logic [19:0] rtg_len;
  } frame_cfg_t;

  // Burst profile of the coding coprocessor (configuration registers).
  typedef struct packed {
    rate_t      rate;
    mod_t       modulation;
    logic [9:0] ncbps;      // coded bits per FEC block, a multiple of 16
  } codec_cfg_t;

  // Constellation unit amplitudes.
  localparam logic signed [15:0] AMP_QPSK  = 16'sd11585;
  localparam logic signed [15:0] AMP_16QAM = 16'sd5181;
  localparam logic signed [15:0] AMP_64QAM = 16'sd2528;

  // 1/K of a 16-stage CORDIC in Q1.15.
  localparam logic signed [15:0] CORDIC_INV_GAIN = 16'sd19898;

  function automatic int unsigned bits_per_symbol(mod_t m);
    case (m)
      MOD_16QAM: return 4;
      MOD_64QAM: return 6;
      default:   return 2;
    endcase
  endfunction

  // One constellation axis: bits b[0] (sign, first bit), b[1], b[2] give an odd level
  // in {1,3,5,7} with sign, times the unit amplitude of the modulation.
  function automatic logic signed [15:0] axis_level(mod_t m, logic [2:0] b);
    logic [2:0] mag;
    logic signed [15:0] amp;
    case (m)
      MOD_16QAM: begin mag = b[1] ? 3'd3 : 3'd1; amp = AMP_16QAM; end
      MOD_64QAM: begin
        case ({b[1], b[2]})
          2'b00: mag = 3'd1;
          2'b01: mag = 3'd3;
          2'b11: mag = 3'd5;
          default: mag = 3'd7;
        endcase
        amp = AMP_64QAM;
      end
      default:   begin mag = 3'd1; amp = AMP_QPSK; end
    endcase
    return b[0] ? -($signed({1'b0, mag}) * amp) : ($signed({1'b0, mag}) * amp);
  endfunction

  // Map up to six bits (bits[0] first in time) to a point: first half of the bits on I,
  // second half on Q.
  function automatic cplx16_t map_point(mod_t m, logic [5:0] bits);
    cplx16_t p;
    case (m)
      MOD_16QAM: begin
        p.re = axis_level(m, {1'b0, bits[1], bits[0]});
        p.im = axis_level(m, {1'b0, bits[3], bits[2]});
      end
      MOD_64QAM: begin
        p.re = axis_level(m, {bits[2], bits[1], bits[0]});
        p.im = axis_level(m, {bits[5], bits[4], bits[3]});
      end
      default: begin
        p.re = axis_level(m, {2'b00, bits[0]});
        p.im = axis_level(m, {2'b00, bits[1]});
      end
    endcase
    return p;
  endfunction

  // Saturate a wide signed value to 16 bits.
  function automatic logic signed [15:0] sat16(logic signed [47:0] v);
    if (v > 48'sd32767) return 16'sd32767;
    if (v < -48'sd32768) return -16'sd32768;
    return v[15:0];
  endfunction

endpackage
