// cmcu_cm: control memory CM, a read-only array of 2^R microinstruction words.
//
// Holds the microprogram: operational microinstructions (y0 = 1, microoperations in FY,
// yE marking the last one) and the additional microinstructions that close each modified
// chain (y0 = 0, class code in FB). The spare words of the memory, which an embedded
// memory block has anyway, are what make room for the additional microinstructions.
//
// Interface: addr (T1..TR), fetch in; q (W-bit word, layout in cmcu_pkg) out. The read is
// asynchronous, so the word addressed by the counter is valid in the same clock cycle;
// while fetch = 0 the output is all zeros, so no microoperation and no yE is issued.
// The content comes from the parameter INIT (default: example microprogram Gamma1).
// Content and word formats follow the method; the asynchronous read and the zero output
// while not fetching are this design's choices.
module cmcu_cm #(
  parameter int unsigned CM_R = cmcu_pkg::R,
  parameter int unsigned CM_W = cmcu_pkg::W,
  parameter logic [CM_W-1:0] INIT [2**CM_R] = cmcu_pkg::GAMMA1_CM
) (
  input  logic [1:CM_R]     addr,
  input  logic              fetch,
  output logic [CM_W-1:0]   q
);

  logic [CM_W-1:0] mem [2**CM_R];

  assign mem = INIT;

  always_comb q = fetch ? mem[addr] : '0;

endmodule
