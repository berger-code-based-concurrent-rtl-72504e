// berger_pkg - shared constants and constant functions for the Berger-coded
// burst-mode machine with concurrent error detection.
//
// A burst-mode specification is handed to the machines as flat packed
// parameter vectors, indexed by specification state s and branch b
// (flat branch index i = s*N_BR + b):
//   BR_VALID[i]                 branch i exists
//   BR_TERM [i*N_IN +: N_IN]    input vector once the input burst of branch i
//                               is complete (entry inputs with the burst's
//                               inputs toggled)
//   BR_NEXT [i*SIDX_W +: SIDX_W] index of the state the branch leads to
//   ST_OUT  [s*N_OUT +: N_OUT]  output vector on entry to state s
//   ST_CODE [s*SB +: SB]        base state code of state s (before the
//                               inverter-free re-encoding)
//
// The functions here are evaluated at elaboration time:
//   * berger_width / berger_code: the Berger check symbol of an output
//     vector, the binary count of its zeros.
//   * neg_mask / aug_width / aug_code: the inverter-free re-encoding. A base
//     state bit that some state needs as a negative identifier (the state is
//     told apart from another state only by a 0 in that bit) gets a companion
//     bit holding its complement, so that every pair of states is told apart
//     by a bit that is 1 in one of them. States can then be decoded with
//     positive literals of the state bits only.
//
// The default specification is a four-phase Q-element (handshake expander)
// with two inputs, two outputs and four states; it is this design's example,
// not a table from the source of the method.
package berger_pkg;

  // Width of one next-state index field in BR_NEXT.
  localparam int unsigned SIDX_W = 8;

  // Number of Berger check bits for R information bits: ceil(log2(R+1)).
  function automatic int unsigned berger_width(input int unsigned r);
    return $clog2(r + 1);
  endfunction

  // Berger check symbol: binary count of the zeros of the R low bits of v.
  function automatic logic [31:0] berger_code(input logic [255:0] v, input int unsigned r);
    logic [31:0] zeros;
    zeros = '0;
    for (int unsigned i = 0; i < r; i++) if (!v[i]) zeros++;
    return zeros;
  endfunction

  // Base-code bits that need a complement companion. For every ordered pair
  // of distinct states (s, t) where s has no bit at 1 that t has at 0, s can
  // only be told from t by a 0 (negative identifier); each bit that is 0 in s
  // and 1 in t is then given a companion.
  function automatic logic [255:0] neg_mask(input logic [4095:0] codes,
                                            input int unsigned n_st,
                                            input int unsigned sb);
    logic [255:0] m, cs, ct, msk;
    m   = '0;
    msk = '0;
    for (int unsigned k = 0; k < sb; k++) msk[k] = 1'b1;
    for (int unsigned s = 0; s < n_st; s++) begin
      for (int unsigned t = 0; t < n_st; t++) begin
        if (s != t) begin
          cs = 256'(codes >> (s * sb)) & msk;
          ct = 256'(codes >> (t * sb)) & msk;
          if ((cs & ~ct) == '0) m = m | (ct & ~cs);
        end
      end
    end
    return m;
  endfunction

  // Width of the re-encoded state: base bits plus one companion per bit of
  // the negative-identifier mask.
  function automatic int unsigned aug_width(input logic [4095:0] codes,
                                            input int unsigned n_st,
                                            input int unsigned sb);
    logic [255:0] m;
    int unsigned  w;
    m = neg_mask(codes, n_st, sb);
    w = sb;
    for (int unsigned k = 0; k < sb; k++) if (m[k]) w++;
    return w;
  endfunction

  // Re-encoded code of state s: base code in the low SB bits, then the
  // complements of the masked bits in ascending bit order.
  function automatic logic [255:0] aug_code(input logic [4095:0] codes,
                                            input int unsigned n_st,
                                            input int unsigned sb,
                                            input int unsigned s);
    logic [255:0] m, c, r;
    int unsigned  w;
    m = neg_mask(codes, n_st, sb);
    c = 256'(codes >> (s * sb));
    r = '0;
    for (int unsigned k = 0; k < sb; k++) r[k] = c[k];
    w = sb;
    for (int unsigned k = 0; k < sb; k++) begin
      if (m[k]) begin
        r[w] = ~c[k];
        w++;
      end
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Default specification: four-phase Q-element.
  // Inputs : bit0 li (request from the left), bit1 ri (acknowledge from right)
  // Outputs: bit0 lo (acknowledge to the left), bit1 ro (request to right)
  //   S0 in=00 out=00 : li+ -> S1, ro+
  //   S1 in=01 out=10 : ri+ -> S2, ro-
  //   S2 in=11 out=00 : ri- -> S3, lo+
  //   S3 in=01 out=01 : li- -> S0, lo-
  // ---------------------------------------------------------------------
  localparam int unsigned QE_N_IN  = 2;
  localparam int unsigned QE_N_OUT = 2;
  localparam int unsigned QE_N_ST  = 4;
  localparam int unsigned QE_N_BR  = 1;
  localparam int unsigned QE_SB    = 2;
  localparam logic [QE_N_ST*QE_N_BR-1:0]        QE_BR_VALID = 4'b1111;
  localparam logic [QE_N_ST*QE_N_BR*QE_N_IN-1:0] QE_BR_TERM  = {2'b00, 2'b01, 2'b11, 2'b01};
  localparam logic [QE_N_ST*QE_N_BR*SIDX_W-1:0] QE_BR_NEXT  = {8'd0, 8'd3, 8'd2, 8'd1};
  localparam logic [QE_N_ST*QE_N_OUT-1:0]       QE_ST_OUT   = {2'b01, 2'b00, 2'b10, 2'b00};
  localparam logic [QE_N_ST*QE_N_IN-1:0]        QE_ST_IN    = {2'b01, 2'b11, 2'b01, 2'b00};
  localparam logic [QE_N_ST*QE_SB-1:0]          QE_ST_CODE  = {2'd3, 2'd2, 2'd1, 2'd0};

endpackage
