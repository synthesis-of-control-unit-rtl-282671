// cmcu_tf: fetch flip-flop TF.
//
// A set/reset flip-flop whose output Fetch allows microinstructions to be read and the
// counter to advance. Start sets it; yE, read with the last microinstruction of the
// algorithm, resets it and so ends the run.
//
// Interface: clk, rst_n (active-low, asynchronous, clears Fetch), s (Start), r (yE) in;
// q (Fetch) out. Clocked on the rising edge. The set/reset roles follow the method; the
// clocked implementation, the reset and set winning over reset are this design's choices.
module cmcu_tf (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (s)  q <= 1'b1;
    else if (r)  q <= 1'b0;
  end

endmodule
