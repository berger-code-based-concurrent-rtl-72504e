// tb_spec_pkg - test specification and reference model for the burst-mode
// testbenches.
//
// Spec "B" exercises what the default Q-element does not: input bursts of
// two inputs, a state with two branches and three outputs (so the Berger
// check symbol has two bits and several weights).
//   inputs bit0 a, bit1 b; outputs bit0 c, bit1 d, bit2 e
//   S0 in=00 out=000 : a+ b+ -> S1
//   S1 in=11 out=011 : a- b- -> S2
//   S2 in=00 out=100 : a+    -> S3   |  b+ -> S4
//   S3 in=01 out=111 : a-    -> S0
//   S4 in=10 out=001 : b-    -> S0
// The tables below are unpacked for readability and packed by functions
// into the flat parameter layout of the design.
package tb_spec_pkg;

  localparam int unsigned SIDX_W = 8;

  localparam int unsigned B_N_IN  = 2;
  localparam int unsigned B_N_OUT = 3;
  localparam int unsigned B_N_ST  = 5;
  localparam int unsigned B_N_BR  = 2;
  localparam int unsigned B_SB    = 3;

  localparam int B_VALID_A [B_N_ST*B_N_BR] = '{1, 0, 1, 0, 1, 1, 1, 0, 1, 0};
  localparam int B_TERM_A  [B_N_ST*B_N_BR] = '{3, 0, 0, 0, 1, 2, 0, 0, 0, 0};
  localparam int B_NEXT_A  [B_N_ST*B_N_BR] = '{1, 0, 2, 0, 3, 4, 0, 0, 0, 0};
  localparam int B_OUT_A   [B_N_ST]        = '{0, 3, 4, 7, 1};

  function automatic logic [B_N_ST*B_N_BR-1:0] b_valid();
    for (int i = 0; i < B_N_ST*B_N_BR; i++) b_valid[i] = B_VALID_A[i][0];
  endfunction
  function automatic logic [B_N_ST*B_N_BR*B_N_IN-1:0] b_term();
    for (int i = 0; i < B_N_ST*B_N_BR; i++) b_term[i*B_N_IN +: B_N_IN] = B_N_IN'(B_TERM_A[i]);
  endfunction
  function automatic logic [B_N_ST*B_N_BR*SIDX_W-1:0] b_next();
    for (int i = 0; i < B_N_ST*B_N_BR; i++) b_next[i*SIDX_W +: SIDX_W] = SIDX_W'(B_NEXT_A[i]);
  endfunction
  function automatic logic [B_N_ST*B_N_OUT-1:0] b_out();
    for (int s = 0; s < B_N_ST; s++) b_out[s*B_N_OUT +: B_N_OUT] = B_N_OUT'(B_OUT_A[s]);
  endfunction
  function automatic logic [B_N_ST*B_SB-1:0] b_code();
    for (int s = 0; s < B_N_ST; s++) b_code[s*B_SB +: B_SB] = B_SB'(s);
  endfunction

  localparam logic [B_N_ST*B_N_BR-1:0]        B_BR_VALID = b_valid();
  localparam logic [B_N_ST*B_N_BR*B_N_IN-1:0] B_BR_TERM  = b_term();
  localparam logic [B_N_ST*B_N_BR*SIDX_W-1:0] B_BR_NEXT  = b_next();
  localparam logic [B_N_ST*B_N_OUT-1:0]       B_ST_OUT   = b_out();
  localparam logic [B_N_ST*B_SB-1:0]          B_ST_CODE  = b_code();

  // Reference: does input vector v complete a burst of state s? Returns the
  // next state in nxt.
  function automatic bit ref_fire(int s, int v, output int nxt);
    nxt = s;
    for (int b = 0; b < B_N_BR; b++) begin
      if (B_VALID_A[s*B_N_BR+b] != 0 && B_TERM_A[s*B_N_BR+b] == v) begin
        nxt = B_NEXT_A[s*B_N_BR+b];
        return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  // Reference: pick a random valid branch of state s, return its terminal
  // input vector.
  function automatic int ref_pick_term(int s);
    int cand [$];
    for (int b = 0; b < B_N_BR; b++)
      if (B_VALID_A[s*B_N_BR+b] != 0) cand.push_back(B_TERM_A[s*B_N_BR+b]);
    return cand[$urandom_range(cand.size() - 1)];
  endfunction

  // Reference Berger symbol: number of zeros among the r low bits of v.
  function automatic int ref_zeros(int v, int r);
    int z = 0;
    for (int i = 0; i < r; i++) if (((v >> i) & 1) == 0) z++;
    return z;
  endfunction

endpackage
