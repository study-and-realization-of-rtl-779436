// fft_pkg: types and constants shared by the mixed-radix FFT processor.
//
// A sample is a complex number with DW-bit two's-complement real and imaginary parts
// (fraction format Q1.(DW-1)). The datapath has LANES = 16 parallel lanes, the memory
// has 16 banks of 256 words per block, and a transform has at most MAX_STAGES stages.
// SUP_TABLE lists every transform length the processor accepts, with the two skew
// coefficients of its bank mapping (see addgen): bank = (i[3:0] + a*i[7:4] + b*i[11:8])
// mod 16 for data index i. The lengths are the products of 2, 3 and 5 up to 4096 for
// which this mapping, with the stage plan of stage_seq_rom, never puts two data of one
// memory access cycle in the same bank; a and b are the smallest such pair.
package fft_pkg;

  localparam int DW         = 16;    // bits per real / imaginary part
  localparam int LANES      = 16;    // samples per cycle (radix-16 butterfly width)
  localparam int BANKS      = 16;    // memory banks per memory block
  localparam int BANK_DEPTH = 256;   // words per bank
  localparam int NMAX       = 4096;  // largest transform length
  localparam int NW         = $clog2(NMAX) + 1;  // width of a length (up to 4096) or index
  localparam int AW         = 8;     // bank address width
  localparam int BW         = 4;     // bank number width
  localparam int MAX_STAGES = 8;     // entries of the stage sequence (N_OUT[0:7])
  localparam int SW         = 3;     // stage number width
  localparam int RW         = 5;     // radix field width (values up to 16)
  localparam int ZW         = 19;    // rotation angle: unsigned, 3 integer + ZF fraction bits
  localparam int ZF         = 16;    // fraction bits of an angle in radians
  localparam int LIDX_W     = 7;     // width of a length-table index

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Wide sample used inside the butterfly unit (DW + 5 bits: growth of a radix-16 DFT
  // plus one guard bit).
  localparam int IW = DW + 5;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } wcplx_t;

  // Butterfly constants, Q1.14 (value * 2^14, rounded).
  localparam int CF          = 14;
  localparam logic signed [17:0] C_COS_PI8   = 15137;   // cos(pi/8)
  localparam logic signed [17:0] C_SIN_PI8   = 6270;    // sin(pi/8)
  localparam logic signed [17:0] C_SQRT1_2   = 11585;   // cos(pi/4)
  localparam logic signed [17:0] C_SQRT3_2   = 14189;   // sin(2*pi/3)
  localparam logic signed [17:0] C_R5_M2     = 9159;    // (cos(2*pi/5) - cos(4*pi/5)) / 2
  localparam logic signed [17:0] C_SIN_2PI5  = 15582;   // sin(2*pi/5)
  localparam logic signed [17:0] C_SIN_4PI5  = 9630;    // sin(4*pi/5)

  // Radix of a butterfly operation, carried on SEL.
  typedef enum logic [2:0] {
    RAD2  = 3'd0,
    RAD3  = 3'd1,
    RAD4  = 3'd2,
    RAD5  = 3'd3,
    RAD8  = 3'd4,
    RAD16 = 3'd5
  } radix_e;

  typedef struct packed {
    logic [NW-1:0] n;
    logic [3:0]    skew_a;
    logic [3:0]    skew_b;
  } sup_entry_t;

  localparam int NUM_LENGTHS = 106;

  localparam sup_entry_t SUP_TABLE [NUM_LENGTHS] = '{
    '{13'd2, 4'd0, 4'd0},
    '{13'd3, 4'd0, 4'd0},
    '{13'd4, 4'd0, 4'd0},
    '{13'd5, 4'd0, 4'd0},
    '{13'd6, 4'd0, 4'd0},
    '{13'd8, 4'd0, 4'd0},
    '{13'd9, 4'd0, 4'd0},
    '{13'd10, 4'd0, 4'd0},
    '{13'd12, 4'd0, 4'd0},
    '{13'd15, 4'd0, 4'd0},
    '{13'd16, 4'd0, 4'd0},
    '{13'd18, 4'd0, 4'd0},
    '{13'd20, 4'd0, 4'd0},
    '{13'd24, 4'd0, 4'd0},
    '{13'd25, 4'd0, 4'd0},
    '{13'd27, 4'd0, 4'd0},
    '{13'd30, 4'd0, 4'd0},
    '{13'd32, 4'd1, 4'd0},
    '{13'd36, 4'd0, 4'd0},
    '{13'd40, 4'd0, 4'd0},
    '{13'd45, 4'd0, 4'd0},
    '{13'd48, 4'd0, 4'd0},
    '{13'd50, 4'd0, 4'd0},
    '{13'd54, 4'd0, 4'd0},
    '{13'd60, 4'd0, 4'd0},
    '{13'd64, 4'd1, 4'd0},
    '{13'd72, 4'd0, 4'd0},
    '{13'd75, 4'd0, 4'd0},
    '{13'd80, 4'd0, 4'd0},
    '{13'd81, 4'd0, 4'd0},
    '{13'd90, 4'd0, 4'd0},
    '{13'd100, 4'd0, 4'd0},
    '{13'd108, 4'd0, 4'd0},
    '{13'd120, 4'd0, 4'd0},
    '{13'd125, 4'd0, 4'd0},
    '{13'd128, 4'd1, 4'd0},
    '{13'd135, 4'd0, 4'd0},
    '{13'd144, 4'd0, 4'd0},
    '{13'd150, 4'd0, 4'd0},
    '{13'd162, 4'd0, 4'd0},
    '{13'd180, 4'd0, 4'd0},
    '{13'd200, 4'd0, 4'd0},
    '{13'd216, 4'd0, 4'd0},
    '{13'd225, 4'd0, 4'd0},
    '{13'd240, 4'd0, 4'd0},
    '{13'd243, 4'd0, 4'd0},
    '{13'd250, 4'd0, 4'd0},
    '{13'd256, 4'd1, 4'd0},
    '{13'd270, 4'd0, 4'd0},
    '{13'd300, 4'd0, 4'd0},
    '{13'd324, 4'd0, 4'd0},
    '{13'd360, 4'd0, 4'd0},
    '{13'd375, 4'd0, 4'd0},
    '{13'd400, 4'd0, 4'd0},
    '{13'd405, 4'd0, 4'd0},
    '{13'd432, 4'd0, 4'd0},
    '{13'd450, 4'd0, 4'd0},
    '{13'd486, 4'd0, 4'd0},
    '{13'd500, 4'd0, 4'd0},
    '{13'd512, 4'd1, 4'd1},
    '{13'd540, 4'd0, 4'd0},
    '{13'd600, 4'd0, 4'd0},
    '{13'd625, 4'd0, 4'd0},
    '{13'd648, 4'd0, 4'd0},
    '{13'd675, 4'd0, 4'd0},
    '{13'd720, 4'd0, 4'd0},
    '{13'd729, 4'd0, 4'd0},
    '{13'd750, 4'd0, 4'd0},
    '{13'd810, 4'd0, 4'd0},
    '{13'd900, 4'd0, 4'd0},
    '{13'd972, 4'd0, 4'd0},
    '{13'd1000, 4'd0, 4'd0},
    '{13'd1024, 4'd1, 4'd1},
    '{13'd1080, 4'd0, 4'd0},
    '{13'd1125, 4'd0, 4'd0},
    '{13'd1200, 4'd0, 4'd0},
    '{13'd1215, 4'd0, 4'd0},
    '{13'd1250, 4'd0, 4'd0},
    '{13'd1296, 4'd0, 4'd0},
    '{13'd1350, 4'd0, 4'd0},
    '{13'd1458, 4'd0, 4'd0},
    '{13'd1500, 4'd0, 4'd0},
    '{13'd1620, 4'd0, 4'd0},
    '{13'd1800, 4'd0, 4'd0},
    '{13'd1875, 4'd0, 4'd0},
    '{13'd1944, 4'd0, 4'd0},
    '{13'd2000, 4'd0, 4'd0},
    '{13'd2025, 4'd0, 4'd0},
    '{13'd2048, 4'd1, 4'd1},
    '{13'd2160, 4'd0, 4'd0},
    '{13'd2187, 4'd0, 4'd0},
    '{13'd2250, 4'd0, 4'd0},
    '{13'd2430, 4'd0, 4'd0},
    '{13'd2500, 4'd0, 4'd0},
    '{13'd2700, 4'd0, 4'd0},
    '{13'd2916, 4'd0, 4'd0},
    '{13'd3000, 4'd0, 4'd0},
    '{13'd3125, 4'd0, 4'd0},
    '{13'd3240, 4'd0, 4'd0},
    '{13'd3375, 4'd0, 4'd0},
    '{13'd3600, 4'd0, 4'd0},
    '{13'd3645, 4'd0, 4'd0},
    '{13'd3750, 4'd0, 4'd0},
    '{13'd3888, 4'd0, 4'd0},
    '{13'd4050, 4'd0, 4'd0},
    '{13'd4096, 4'd1, 4'd1}
  };

  function automatic radix_e radix_code(input logic [RW-1:0] r);
    case (r)
      5'd2:    return RAD2;
      5'd3:    return RAD3;
      5'd4:    return RAD4;
      5'd5:    return RAD5;
      5'd8:    return RAD8;
      default: return RAD16;
    endcase
  endfunction

  // log2 of the scaling applied by a radix-r butterfly: ceil(log2(r)).
  function automatic int unsigned radix_shift(input radix_e r);
    case (r)
      RAD2:          return 1;
      RAD3, RAD4:    return 2;
      RAD5, RAD8:    return 3;
      default:       return 4;
    endcase
  endfunction

  // cos and sin of 2*pi*e/16 in Q1.14, for the twiddles inside a radix-8/16 butterfly.
  function automatic int cos16(input int e);
    int q;
    int base [5];
    base = '{16384, int'(C_COS_PI8), int'(C_SQRT1_2), int'(C_SIN_PI8), 0};
    q = e % 16;
    if (q <= 4)       return base[q];
    else if (q <= 8)  return -base[8 - q];
    else if (q <= 12) return -base[q - 8];
    else              return base[16 - q];
  endfunction

  function automatic int sin16(input int e);
    return cos16((e + 12) % 16);   // sin(x) = cos(x - pi/2)
  endfunction

  function automatic wcplx_t wadd(input wcplx_t a, input wcplx_t b);
    wadd.re = a.re + b.re;
    wadd.im = a.im + b.im;
  endfunction

  function automatic wcplx_t wsub(input wcplx_t a, input wcplx_t b);
    wsub.re = a.re - b.re;
    wsub.im = a.im - b.im;
  endfunction

  // multiply by -j
  function automatic wcplx_t wmj(input wcplx_t a);
    wmj.re = a.im;
    wmj.im = -a.re;
  endfunction

  // multiply by a real Q1.14 constant, rounded
  function automatic logic signed [IW-1:0] rmul(input logic signed [IW-1:0] a,
                                                input logic signed [17:0] c);
    logic signed [IW+17:0] pr;
    pr   = a * c;
    rmul = IW'((pr + (IW+18)'(1 <<< (CF - 1))) >>> CF);
  endfunction

  function automatic wcplx_t wscale(input wcplx_t a, input logic signed [17:0] c);
    wscale.re = rmul(a.re, c);
    wscale.im = rmul(a.im, c);
  endfunction

  // multiply by exp(-j*2*pi*e/16) = cos - j sin
  function automatic wcplx_t wtw16(input wcplx_t a, input int e);
    logic signed [17:0] c, s;
    c = 18'(cos16(e));
    s = 18'(sin16(e));
    wtw16.re = rmul(a.re, c) + rmul(a.im, s);
    wtw16.im = rmul(a.im, c) - rmul(a.re, s);
  endfunction

endpackage
