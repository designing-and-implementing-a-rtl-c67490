// ascii_lut: 4-bit digit to 8-bit ASCII character code.
//
// Combinational look-up used by the LCD controller: the BCD digits 0-9 map to
// the characters '0'-'9' (30h-39h). The values 10-15 never occur in BCD; they
// map to 'A'-'F' (41h-46h) so that the table is total.
module ascii_lut (
  input  logic [3:0] digit,
  output logic [7:0] ascii
);
  always_comb begin
    if (digit < 4'd10) ascii = 8'h30 + {4'h0, digit};
    else               ascii = 8'h37 + {4'h0, digit};
  end
endmodule
