// cmcu_u2: compositional microprogram control unit with modified operational linear chains.
//
// The unit runs a microprogram stored in control memory CM. Counter CT addresses CM; the
// word read out drives the operational unit with microoperations y1..yN. Inside an
// operational linear chain the next node is at the next address, so y0 = 1 simply makes
// CT count up. Every chain that does not end the algorithm is closed by an additional
// microinstruction (y0 = 0) whose field FB holds the code tau of the chain's class of
// pseudoequivalent chains. In that cycle circuit CC turns tau and the logic conditions X
// into the next address Phi, which CT loads. The operational unit is idle during that
// cycle; ou_en (= Fetch & y0) is the enable for its timing pulses, and y is held at zero.
// Flip-flop TF is set by Start and reset by yE of the last microinstruction.
//
// Interface: clk, rst_n (active-low asynchronous reset), start (one-cycle pulse), x
// (x1..xL, sampled in the cycle of an additional microinstruction) in; y (y1..yN, valid in
// cycles where ou_en = 1), ou_en, fetch, y_end (yE of the word being executed) and addr
// (current address T1..TR) out.
// Timing: the cycle after the clock edge that sees start, the first microinstruction is
// executed; then one microinstruction per clock. A run over a chain of F nodes costs F
// cycles plus one idle cycle for the additional microinstruction; fetch drops after the
// clock edge that sees yE.
// The structure (CC, CT, CM, TF and their connections) and the default microprogram
// (example flow-chart Gamma1) follow the method; the single-clock synchronous timing,
// gating y with y0 and the reset are this design's choices. Elaboration checks enforce the
// method's size rules, and an assertion checks that every additional microinstruction
// selects exactly one transition.
module cmcu_u2
  import cmcu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [1:L]   x,
  output logic [1:N]   y,
  output logic         ou_en,
  output logic         fetch,
  output logic         y_end,
  output logic [1:R]   addr
);

  logic [1:R]    t;
  logic [1:R]    phi;
  logic [W-1:0]  word;
  logic          y0;
  logic [R1-1:0] tau;
  logic [H-1:0]  term;

  cmcu_ct u_ct (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .fetch (fetch),
    .y0    (y0),
    .phi   (phi),
    .t     (t)
  );

  cmcu_cm u_cm (
    .addr  (t),
    .fetch (fetch),
    .q     (word)
  );

  cmcu_cc u_cc (
    .tau  (tau),
    .x    (x),
    .phi  (phi),
    .term (term)
  );

  cmcu_tf u_tf (
    .clk   (clk),
    .rst_n (rst_n),
    .s     (start),
    .r     (y_end),
    .q     (fetch)
  );

  always_comb begin
    y0    = mi_y0(word);
    tau   = mi_fb(word);
    y_end = mi_ye(word);
    ou_en = fetch & y0;
    y     = ou_en ? mi_fy(word) : '0;
  end

  assign addr = t;

  // Size rules of the method, checked at elaboration: R = ceil(log2 M), R1 = ceil(log2 I),
  // and the memory must have a spare word for every additional microinstruction.
  if (R != $clog2(M))  $error("R must be ceil(log2 M)");
  if (R1 != $clog2(I)) $error("R1 must be ceil(log2 I)");
  if (2 ** R - M < NC) $error("control memory has too few spare words for the additional MIs");

  // An additional microinstruction must select exactly one row of the transition table.
  a_one_transition: assert property (@(posedge clk) disable iff (!rst_n)
    (fetch && !y0) |-> (term != '0 && (term & (term - 1'b1)) == '0))
    else $error("additional MI at %b: %0d transition rows active", t, $countones(term));

endmodule
