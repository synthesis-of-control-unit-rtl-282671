// cmcu_ct: counter CT holding the address T1..TR of the current microinstruction.
//
// On a Start pulse the counter is loaded with the address of the first microinstruction.
// While fetching, each clock either adds one to the address (y0 = 1, the next node of the
// same operational linear chain sits at the next address) or loads the address phi formed
// by circuit CC (y0 = 0, an additional microinstruction closing a chain). When fetching
// has stopped the counter holds its value.
//
// Interface: clk, rst_n (active-low, asynchronous, clears the address), start, fetch, y0,
// phi (D1..DR) in; t (T1..TR, T1 most significant) out. All updates on the rising edge.
// Increment/load selection by y0 and loading on Start follow the method; holding while
// Fetch = 0, the reset and Start taking priority are this design's choices.
module cmcu_ct #(
  parameter int unsigned CT_R = cmcu_pkg::R,
  parameter logic [1:CT_R] START_ADDR = cmcu_pkg::GAMMA1_START
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           fetch,
  input  logic           y0,
  input  logic [1:CT_R]  phi,
  output logic [1:CT_R]  t
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      t <= '0;
    else if (start)  t <= START_ADDR;
    else if (fetch)  t <= y0 ? t + 1'b1 : phi;
  end

endmodule
