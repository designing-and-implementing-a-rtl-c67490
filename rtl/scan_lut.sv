// scan_lut: look-up table from a PS/2 scan code to a calculator key.
//
// Combinational. The calculator accepts the hexadecimal digits 0-9 and A-F
// and the three command keys '*', '#' and '='; every other code maps to
// KEY_NONE and is ignored. Codes are from scan-code set 2 (make codes). The
// key set follows the published design; how each symbol is reached on a
// standard keyboard is this design's choice: '*' is keypad '*' or Shift+8,
// '#' is Shift+3, '=' is the unshifted '=' key. With Shift held the digit
// keys other than 3 and 8 give symbols and are rejected; A-F are accepted
// with or without Shift.
module scan_lut
  import calc_pkg::*;
(
  input  logic [7:0] code,
  input  logic       shift,
  output key_t       key
);
  always_comb begin
    key = '{kind: KEY_NONE, value: 4'd0};
    unique case (code)
      8'h45: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h0};
      8'h16: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h1};
      8'h1E: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h2};
      8'h26: key = '{kind: shift ? KEY_HASH : KEY_DIGIT, value: 4'h3};
      8'h25: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h4};
      8'h2E: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h5};
      8'h36: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h6};
      8'h3D: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h7};
      8'h3E: key = '{kind: shift ? KEY_STAR : KEY_DIGIT, value: 4'h8};
      8'h46: key = '{kind: shift ? KEY_NONE : KEY_DIGIT, value: 4'h9};
      8'h1C: key = '{kind: KEY_DIGIT, value: 4'hA};
      8'h32: key = '{kind: KEY_DIGIT, value: 4'hB};
      8'h21: key = '{kind: KEY_DIGIT, value: 4'hC};
      8'h23: key = '{kind: KEY_DIGIT, value: 4'hD};
      8'h24: key = '{kind: KEY_DIGIT, value: 4'hE};
      8'h2B: key = '{kind: KEY_DIGIT, value: 4'hF};
      8'h7C: key = '{kind: KEY_STAR,  value: 4'h0};
      8'h55: key = '{kind: shift ? KEY_NONE : KEY_EQUAL, value: 4'h0};
      default: ;
    endcase
  end
endmodule
