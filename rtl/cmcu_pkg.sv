// cmcu_pkg: sizes, microinstruction layout and the example microprogram shared by the
// compositional microprogram control unit (CMCU) with modified operational linear chains.
//
// The control unit interprets a linear flow-chart of an algorithm. Every operational node
// of the flow-chart is one microinstruction (MI) in the control memory, and the nodes of
// each operational linear chain (OLC) sit at consecutive addresses ("natural addressing").
// Each chain whose output does not lead to the final node is closed by one additional MI
// that carries only the code K(B_i) of the class B_i of pseudoequivalent chains it belongs
// to. The next-address logic then depends on that class code instead of on the full
// address, which cuts its product terms to those of an equivalent Mealy machine.
//
// Word layout (W = N + 2 bits, most significant bit first):
//   [W-1]       y0    1: operational MI, counter increments; 0: additional MI, counter loads
//   [W-2 : 1]   FY    microoperations y1..yN (bit W-2 is y1); in an additional MI the upper
//                     R1 bits of this field are the field FB = K(B_i) (tau1 shares y1's bit)
//   [0]         yE    last MI of the algorithm: ends fetching
// This layout and all the numbers below follow the worked example of the method (flow-chart
// Gamma1: ten operational nodes, microoperations y1..y5, conditions x1..x3, two classes).
// Filling the don't-care bits of additional MIs and of unused words with zeros is this
// design's choice.
package cmcu_pkg;

  // Example sizes.
  localparam int unsigned M  = 10;  // operational nodes of Gamma1
  localparam int unsigned R  = 4;   // address bits, ceil(log2 M)
  localparam int unsigned N  = 5;   // microoperations y1..y5
  localparam int unsigned L  = 3;   // logic conditions x1..x3
  localparam int unsigned I  = 2;   // classes of pseudoequivalent OLCs
  localparam int unsigned R1 = 1;   // class code bits, ceil(log2 I)
  localparam int unsigned H  = 5;   // rows of the table of transitions (product terms)
  localparam int unsigned NC = 4;   // chains closed by an additional MI (not ending the algorithm)
  localparam int unsigned W  = N + 2;
  localparam int unsigned WORDS = 2 ** R;

  typedef logic [W-1:0] mi_word_t;

  // Field helpers on a control memory word.
  function automatic logic mi_y0(input mi_word_t w);
    return w[W-1];
  endfunction

  function automatic logic [1:N] mi_fy(input mi_word_t w);
    return w[W-2:1];
  endfunction

  function automatic logic mi_ye(input mi_word_t w);
    return w[0];
  endfunction

  function automatic logic [R1-1:0] mi_fb(input mi_word_t w);
    return w[W-2 -: R1];
  endfunction

  // Word builders: operational MI with microoperations fy, and additional MI with code k.
  function automatic mi_word_t op_mi(input logic [1:N] fy, input logic ye);
    return {1'b1, fy, ye};
  endfunction

  function automatic mi_word_t add_mi(input logic [R1-1:0] k);
    mi_word_t w;
    w = '0;
    w[W-2 -: R1] = k;
    return w;
  endfunction

  // Control memory content for Gamma1 after modification of the chains:
  //   alpha1 = <b1, O1>          addresses 0000..0001, class B1 (K = 0)
  //   alpha2 = <b2, b3, b4, O2>  addresses 0010..0101, class B1
  //   alpha3 = <b5, b6, O3>      addresses 0110..1000, class B1
  //   alpha4 = <b7, b8, O4>      addresses 1001..1011, class B2 (K = 1)
  //   alpha5 = <b9, b10>         addresses 1100..1101, ends the algorithm
  // 14 of the 16 words are used; 1110 and 1111 are free.
  localparam mi_word_t GAMMA1_CM [WORDS] = '{
    op_mi(5'b10000, 1'b0),  // 0000 b1 : y1
    add_mi(1'b0),           // 0001 O1 : K(B1)
    op_mi(5'b01100, 1'b0),  // 0010 b2 : y2 y3
    op_mi(5'b00010, 1'b0),  // 0011 b3 : y4
    op_mi(5'b01010, 1'b0),  // 0100 b4 : y2 y4
    add_mi(1'b0),           // 0101 O2 : K(B1)
    op_mi(5'b00100, 1'b0),  // 0110 b5 : y3
    op_mi(5'b00010, 1'b0),  // 0111 b6 : y4
    add_mi(1'b0),           // 1000 O3 : K(B1)
    op_mi(5'b01001, 1'b0),  // 1001 b7 : y2 y5
    op_mi(5'b00100, 1'b0),  // 1010 b8 : y3
    add_mi(1'b1),           // 1011 O4 : K(B2)
    op_mi(5'b11000, 1'b0),  // 1100 b9 : y1 y2
    op_mi(5'b00100, 1'b1),  // 1101 b10: y3, end
    '0,                     // 1110 free
    '0                      // 1111 free
  };

  // Table of transitions of the example: one row per product term h. A row is taken when
  // the class code tau equals K and the conditions selected by XMASK equal XVAL; its
  // address PHI is then loaded into the counter. Bit order of x is x1..xL from the left,
  // of PHI is D1..DR (D1 drives the most significant address bit T1).
  //   h1: B1, x1            -> b2 0010
  //   h2: B1, /x1 x2        -> b5 0110
  //   h3: B1, /x1 /x2       -> b7 1001
  //   h4: B2, x3            -> b9 1100
  //   h5: B2, /x3           -> b8 1010
  localparam logic [R1-1:0] GAMMA1_K     [H] = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b1};
  localparam logic [1:L]    GAMMA1_XMASK [H] = '{3'b100, 3'b110, 3'b110, 3'b001, 3'b001};
  localparam logic [1:L]    GAMMA1_XVAL  [H] = '{3'b100, 3'b010, 3'b000, 3'b001, 3'b000};
  localparam logic [1:R]    GAMMA1_PHI   [H] = '{4'b0010, 4'b0110, 4'b1001, 4'b1100, 4'b1010};

  // Address of the first microinstruction, A(b1).
  localparam logic [1:R] GAMMA1_START = 4'b0000;

endpackage
