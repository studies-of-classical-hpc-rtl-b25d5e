// haar_chunk: one level of the 2-D Haar transform on a 2x2 chunk of words.
//
// A chunk is two vertically adjacent image rows, each 32 pixels wide, held in
// four 128-bit words w<row><word> (16 pixels per word, pixel p in bits
// 8p+7:8p). First each row is filtered horizontally: neighbouring pixel pairs
// (2q, 2q+1) give one low-pass and one high-pass value, so the two words of a
// row yield 16 L and 16 H coefficients. Then L and H are filtered vertically
// between the two rows. The results are four words of 16 coefficients each:
//   ll = vertical low of L    hl = vertical low of H
//   lh = vertical high of L   hh = vertical high of H
// (first letter: horizontal filter, second: vertical filter). Coefficient q of
// each output word belongs to column q of the 16-column output window.
// Combinational; haar_lift does the arithmetic.
module haar_chunk (
  input  logic [127:0] w00,   // upper row, left word
  input  logic [127:0] w01,   // upper row, right word
  input  logic [127:0] w10,   // lower row, left word
  input  logic [127:0] w11,   // lower row, right word
  output logic [127:0] ll,
  output logic [127:0] hl,
  output logic [127:0] lh,
  output logic [127:0] hh
);
  logic [127:0] ev0, od0, ev1, od1;   // even/odd pixels of each row
  logic [127:0] l0, h0, l1, h1;

  always_comb begin
    for (int q = 0; q < 8; q++) begin
      ev0[8*q +: 8]      = w00[16*q +: 8];
      od0[8*q +: 8]      = w00[16*q+8 +: 8];
      ev0[64+8*q +: 8]   = w01[16*q +: 8];
      od0[64+8*q +: 8]   = w01[16*q+8 +: 8];
      ev1[8*q +: 8]      = w10[16*q +: 8];
      od1[8*q +: 8]      = w10[16*q+8 +: 8];
      ev1[64+8*q +: 8]   = w11[16*q +: 8];
      od1[64+8*q +: 8]   = w11[16*q+8 +: 8];
    end
  end

  // horizontal
  haar_lift #(.N(16)) u_row0 (.a(ev0), .b(od0), .s(l0), .d(h0));
  haar_lift #(.N(16)) u_row1 (.a(ev1), .b(od1), .s(l1), .d(h1));
  // vertical
  haar_lift #(.N(16)) u_colL (.a(l0), .b(l1), .s(ll), .d(lh));
  haar_lift #(.N(16)) u_colH (.a(h0), .b(h1), .s(hl), .d(hh));
endmodule
