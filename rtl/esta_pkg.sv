// esta_pkg: types, constants and constant functions shared by the ESTA example
// datapath.
//
// The datapath runs the four-control-step schedule of the example data flow
// graph. Each flow passes through the control steps C1..C4 (state_e). The
// controller drives the datapath through one packed struct (ctrl_t). That
// struct holds every operand-multiplexer select, the register load strobes
// of each step, and the enables of the online tests.
//
// The test logic around the subtractor S1 is a pair of LFSRs and a MISR. All
// three use the same Galois-form feedback polynomial, given by
// lfsr_taps(width). golden_signature() replays a whole fault-free test
// session of that logic at elaboration time. The controller compares the
// MISR against this constant. The polynomials and the session scheme are
// choices of this design: the method only asks for "LFSR/MISR" test logic
// around a resource that has no twin.
package esta_pkg;

  // Control steps of one flow. ST_IDLE waits for an input vector.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_C1   = 3'd1,
    ST_C2   = 3'd2,
    ST_C3   = 3'd3,
    ST_C4   = 3'd4
  } state_e;

  // Indices of the primary inputs a..o in the input vector.
  localparam int unsigned IN_A = 0,  IN_B = 1,  IN_C = 2,  IN_D = 3,  IN_E = 4;
  localparam int unsigned IN_F = 5,  IN_G = 6,  IN_H = 7,  IN_I = 8,  IN_J = 9;
  localparam int unsigned IN_K = 10, IN_L = 11, IN_M = 12, IN_N = 13, IN_O = 14;
  localparam int unsigned N_IN  = 15;
  // Indices of the results +4, +8, *4, *7 in the output vector.
  localparam int unsigned OUT_P4 = 0, OUT_P8 = 1, OUT_T4 = 2, OUT_T7 = 3;
  localparam int unsigned N_OUT = 4;

  // Sources of the error flag, one bit each in err_src.
  localparam int unsigned ERR_ADD = 0;  // EA disagrees with A1 or A2
  localparam int unsigned ERR_M1  = 1;  // M3 disagrees with M1
  localparam int unsigned ERR_M2  = 2;  // M3 disagrees with M2
  localparam int unsigned ERR_S1  = 3;  // MISR signature of S1 is wrong
  localparam int unsigned N_ERR   = 4;

  // Control word from the controller to the datapath.
  typedef struct packed {
    logic [1:0] sel_a1;      // A1 operands: 0 (c,d) 1 (k,s1) 2 (p6,t6) 3 (n,t3)
    logic [1:0] sel_a2;      // A2 operands: 0 (e,f) 1 (l,im0) 2 (t8,m) 3 (t3,p6)
    logic [1:0] sel_m1;      // M1 operands: 0 (g,h) 1 (s1,p1) 2 (im3,im4) 3 (p3,t8)
    logic [1:0] sel_m2;      // M2 operands: 0 (i,j) 1 (im0,im1) 2 (p7,o)
    logic [1:0] sel_m3;      // M3 operands: 0 (im1,im2) 1 (i,j) 2 (im3,im4)
    logic       sel_ea;      // EA operands: 0 (c,d) 1 (l,im0)
    logic       sel_s1;      // S1 operands: 0 (a,b) 1 (lfsr1,lfsr2)
    logic       sel_cmp_add; // result checked against EA: 0 A1, 1 A2
    logic       chk_add;     // check EA against the selected adder
    logic       chk_m1;      // check M3 against M1
    logic       chk_m2;      // check M3 against M2
    logic       bist_step;   // S1 is under LFSR test: advance LFSRs, absorb into MISR
    logic       bist_restart;// reseed the LFSRs and clear the MISR
    logic [3:0] ld_step;     // bit s: load the registers written in step C(s+1)
  } ctrl_t;

  // Galois feedback mask (right-shifting form) of a maximal-length LFSR of the
  // given width. Widths without an entry fall back to a 2-tap mask that is
  // still a valid, if not maximal, LFSR.
  function automatic logic [63:0] lfsr_taps(input int unsigned w);
    case (w)
      4:       return 64'h9;
      5:       return 64'h12;
      6:       return 64'h21;
      7:       return 64'h41;
      8:       return 64'hB8;
      10:      return 64'h204;
      12:      return 64'hE08;
      16:      return 64'hB400;
      20:      return 64'h90000;
      24:      return 64'hE10000;
      32:      return 64'hA3000000;
      default: return (64'd1 << (w - 1)) | 64'd1;
    endcase
  endfunction

  // Width mask: w ones.
  function automatic logic [63:0] wmask(input int unsigned w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // One step of a right-shifting Galois LFSR.
  function automatic logic [63:0] lfsr_next(input logic [63:0] s, input int unsigned w);
    logic [63:0] n;
    n = s >> 1;
    if (s[0]) n = n ^ lfsr_taps(w);
    return n & wmask(w);
  endfunction

  // One step of the MISR: an LFSR step with the input word XORed in.
  function automatic logic [63:0] misr_next(input logic [63:0] s, input logic [63:0] d,
                                            input int unsigned w);
    return (lfsr_next(s, w) ^ d) & wmask(w);
  endfunction

  // Signature that a fault-free S1 leaves in the MISR after a session of len
  // patterns, starting from the LFSR seeds and an all-zero MISR.
  function automatic logic [63:0] golden_signature(input logic [63:0] seed1,
                                                   input logic [63:0] seed2,
                                                   input int unsigned w,
                                                   input int unsigned len);
    logic [63:0] l1, l2, sig;
    l1  = seed1 & wmask(w);
    l2  = seed2 & wmask(w);
    sig = '0;
    for (int unsigned p = 0; p < len; p++) begin
      sig = misr_next(sig, (l1 - l2) & wmask(w), w);
      l1  = lfsr_next(l1, w);
      l2  = lfsr_next(l2, w);
    end
    return sig;
  endfunction

endpackage
