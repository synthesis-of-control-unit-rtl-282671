// cmcu_cc: circuit CC, the next-address logic of the control unit.
//
// CC forms the excitation functions Phi = Phi(tau, X) of the address counter. It is a
// plain sum of products: each row h of the table of transitions is one product term,
// true when the class code tau equals K[h] and the logic conditions picked by XMASK[h]
// equal XVAL[h]. Output bit D_r is the OR of the terms whose target address PHI[h] has
// bit r set, so the number of product terms is the number of table rows, as in the
// method. Because CC sees only the short class code and not the full microinstruction
// address, its terms match those of an equivalent Mealy machine.
//
// Interface: tau (R1 bits, field FB of the current word), x (x1..xL, from the operational
// unit) in; phi (D1..DR, D1 is the most significant address bit) out. Purely combinational.
// The row structure and the default table (example flow-chart Gamma1) follow the method;
// a class code or condition combination that matches no row gives address zero, which is
// this design's choice (the method never reaches CC in that case).
module cmcu_cc
  import cmcu_pkg::*;
#(
  parameter int unsigned CC_R  = cmcu_pkg::R,
  parameter int unsigned CC_R1 = cmcu_pkg::R1,
  parameter int unsigned CC_L  = cmcu_pkg::L,
  parameter int unsigned CC_H  = cmcu_pkg::H,
  parameter logic [CC_R1-1:0] K     [CC_H] = cmcu_pkg::GAMMA1_K,
  parameter logic [1:CC_L]    XMASK [CC_H] = cmcu_pkg::GAMMA1_XMASK,
  parameter logic [1:CC_L]    XVAL  [CC_H] = cmcu_pkg::GAMMA1_XVAL,
  parameter logic [1:CC_R]    PHI   [CC_H] = cmcu_pkg::GAMMA1_PHI
) (
  input  logic [CC_R1-1:0] tau,
  input  logic [1:CC_L]    x,
  output logic [1:CC_R]    phi,
  output logic [CC_H-1:0]  term   // which row is active, for observation
);

  always_comb begin
    phi = '0;
    for (int h = 0; h < int'(CC_H); h++) begin
      term[h] = (tau == K[h]) && ((x & XMASK[h]) == (XVAL[h] & XMASK[h]));
      if (term[h]) phi = phi | PHI[h];
    end
  end

endmodule
