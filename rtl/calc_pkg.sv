// calc_pkg: types and constants shared by the keyboard calculator.
//
// The calculator takes two 16-bit signed operands typed on a PS/2 keyboard,
// multiplies them with a sequential radix-2 Booth multiplier and shows the
// operands and the 32-bit product on a 16x2 character LCD. This package holds
// what more than one module needs: the key classes produced by the scan-code
// look-up table, the display selector of the LCD multiplexer, and the LCD
// command bytes (HD44780 instruction set) used by the LCD controller.
package calc_pkg;

  // Class of a decoded key.
  typedef enum logic [2:0] {
    KEY_NONE  = 3'd0,   // not one of the calculator's keys
    KEY_DIGIT = 3'd1,   // hexadecimal digit 0-F, value in key_t.value
    KEY_STAR  = 3'd2,   // '*': store the typed number in X
    KEY_HASH  = 3'd3,   // '#': store the typed number in Y
    KEY_EQUAL = 3'd4    // '=': start the multiplication
  } key_kind_e;

  typedef struct packed {
    key_kind_e  kind;
    logic [3:0] value;
  } key_t;

  // Which value the LCD multiplexer shows.
  typedef enum logic [1:0] {
    SEL_X = 2'd0,
    SEL_Y = 2'd1,
    SEL_Z = 2'd2
  } disp_sel_e;

  // PS/2 scan-code set 2 prefixes and modifier keys.
  localparam logic [7:0] PS2_BREAK    = 8'hF0;
  localparam logic [7:0] PS2_EXTENDED = 8'hE0;
  localparam logic [7:0] PS2_LSHIFT   = 8'h12;
  localparam logic [7:0] PS2_RSHIFT   = 8'h59;

  // LCD instruction bytes.
  localparam logic [7:0] LCD_CLEAR      = 8'h01;
  localparam logic [7:0] LCD_HOME       = 8'h02;
  localparam logic [7:0] LCD_ENTRY_INC  = 8'h06;
  localparam logic [7:0] LCD_DISP_BLINK = 8'h0E;
  localparam logic [7:0] LCD_FUNC_8B2L  = 8'h38;
  localparam logic [7:0] LCD_LINE1      = 8'h80;
  localparam logic [7:0] LCD_LINE2      = 8'hC0;

  // Number of characters per LCD line.
  localparam int unsigned LCD_COLS = 16;

endpackage
