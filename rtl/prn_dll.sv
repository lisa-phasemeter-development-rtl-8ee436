// prn_dll: delay-locked loop that measures the delay of a received PRN code.
//
// The receiver holds the same m-sequence as prn_code_gen in a table of
// L = 2^CODE_N - 1 chips (filled at start-up by running the LFSR). A local
// code phase cp (clocks, with FR fraction bits) advances one clock per
// clock and wraps at one code period, L * 2^CHIP_LOG2 clocks. The input x
// (e.g. the phase-error signal of a DPLL channel, which carries the phase
// modulation) is multiplied by +1/-1 replicas of the code half a chip early,
// on time (prompt) and half a chip late, and summed over one code period.
// At the end of each period (dump):
//  - search: while |prompt| < acq_thresh the code phase is stepped by half
//    a chip per period (serial acquisition);
//  - track: otherwise the early-minus-late difference, signed by the prompt
//    so that data bits do not flip it, is shifted right by dll_shift and
//    limited to a quarter chip;
//  - the step is held and added to the code phase when cp next passes half
//    a period, so a backward step never produces a short extra period at
//    the wrap;
//  - the delay (transmit phase minus local phase, modulo one period, in
//    clocks with FR fraction bits), the data bit (prompt negative) and the
//    prompt sum are registered and 'valid' pulses.
// The delay is measured against tx_phase from the local transmitter, so the
// result is the round-trip or one-way delay depending on where the code
// came from. The description reports such a DLL for ranging with PRN codes
// but no details: the correlator spacing, search and loop law are this
// design's choices.
module prn_dll #(
  parameter int                CODE_N    = 10,
  parameter logic [CODE_N-1:0] TAPS      = CODE_N'(10'h204),
  parameter int                CHIP_LOG2 = 6,
  parameter int                XW        = 32,
  parameter int                FR        = 8,
  parameter int                AW        = 56
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic signed [XW-1:0]             x,
  input  logic [CODE_N+CHIP_LOG2-1:0]      tx_phase,
  input  logic [5:0]                       dll_shift,
  input  logic [AW-1:0]                    acq_thresh,
  output logic [CODE_N+CHIP_LOG2+FR-1:0]   delay,
  output logic                             data_bit,
  output logic signed [AW-1:0]             prompt,
  output logic                             tracking,
  output logic                             valid
);
  localparam int L   = (2**CODE_N) - 1;
  localparam int PW  = CODE_N + CHIP_LOG2 + FR;                  // phase width
  localparam logic [PW-1:0] PERIOD = PW'(L) << (CHIP_LOG2 + FR); // one code period
  localparam logic [PW-1:0] ONE    = PW'(1) << FR;               // one clock
  localparam logic [PW-1:0] HALF   = PW'(1) << (CHIP_LOG2 - 1 + FR);
  localparam logic [PW-1:0] MID    = PERIOD >> 1;
  localparam logic signed [AW-1:0] QMAX = AW'(1) <<< (CHIP_LOG2 - 2 + FR);

  logic code [L];
  initial begin
    logic [CODE_N-1:0] s;
    s = '1;
    for (int i = 0; i < L; i++) begin
      code[i] = s[CODE_N-1];
      s = {s[CODE_N-2:0], ^(s & TAPS)};
    end
  end

  logic [PW-1:0]         cp, cp_inc, cp_e, cp_l, adj, cp_nx;
  logic                  wrap;
  logic                  ce, cpr, cl;
  logic signed [AW-1:0]  acc_e, acc_p, acc_l, xe, xp, xl, e_fin, p_fin, l_fin;
  logic signed [AW-1:0]  disc, step;
  logic                  p_neg;
  logic [PW-1:0]         pend_adj;
  logic                  pend;

  // phase arithmetic modulo one code period
  function automatic logic [PW-1:0] mod_add(input logic [PW-1:0] a, input logic [PW-1:0] b);
    logic [PW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, PERIOD}) ? PW'(s - {1'b0, PERIOD}) : PW'(s);
  endfunction
  function automatic logic [PW-1:0] mod_sub(input logic [PW-1:0] a, input logic [PW-1:0] b);
    return (a >= b) ? a - b : a + PERIOD - b;
  endfunction
  function automatic logic signed [AW-1:0] sabs(input logic signed [AW-1:0] v);
    return (v < 0) ? -v : v;
  endfunction

  always_comb begin
    cp_inc = mod_add(cp, ONE);
    wrap   = (cp_inc < cp);
    cp_e   = mod_add(cp, HALF);
    cp_l   = mod_sub(cp, HALF);
    ce     = code[int'(CODE_N'(cp_e >> (CHIP_LOG2 + FR)))];
    cpr    = code[int'(cp[PW-1:CHIP_LOG2+FR])];
    cl     = code[int'(CODE_N'(cp_l >> (CHIP_LOG2 + FR)))];
    // chip 0 -> +1, chip 1 -> -1
    xe     = ce  ? acc_e - AW'(x) : acc_e + AW'(x);
    xp     = cpr ? acc_p - AW'(x) : acc_p + AW'(x);
    xl     = cl  ? acc_l - AW'(x) : acc_l + AW'(x);
    // end-of-period values include this clock's sample
    e_fin  = xe;
    p_fin  = xp;
    l_fin  = xl;
    p_neg  = p_fin < 0;
    disc   = p_neg ? (l_fin - e_fin) : (e_fin - l_fin);
    step   = disc >>> dll_shift;
    if (step > QMAX)  step = QMAX;
    if (step < -QMAX) step = -QMAX;
    if (sabs(p_fin) < $signed(acq_thresh)) adj = HALF;                  // search
    else if (step < 0)                     adj = mod_sub(PW'(0), PW'(-step));
    else                                   adj = PW'(step);
    cp_nx  = (pend && cp_inc >= MID) ? mod_add(cp_inc, pend_adj) : cp_inc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cp       <= '0;
      pend     <= 1'b0;
      pend_adj <= '0;
      acc_e    <= '0;
      acc_p    <= '0;
      acc_l    <= '0;
      delay    <= '0;
      data_bit <= 1'b0;
      prompt   <= '0;
      tracking <= 1'b0;
      valid    <= 1'b0;
    end else begin
      cp    <= cp_nx;
      valid <= wrap;
      if (pend && cp_inc >= MID) pend <= 1'b0;
      if (wrap) begin
        pend     <= 1'b1;
        pend_adj <= adj;
        acc_e    <= '0;
        acc_p    <= '0;
        acc_l    <= '0;
        prompt   <= p_fin;
        data_bit <= p_neg;
        tracking <= !(sabs(p_fin) < $signed(acq_thresh));
        delay    <= mod_sub({tx_phase, FR'(0)}, cp);
      end else begin
        acc_e <= xe;
        acc_p <= xp;
        acc_l <= xl;
      end
    end
  end
endmodule
