// font_rom: character glyph table of the VGA text console.
//
// Each character is an 8x8 pixel cell; `bits` is row `row` of the cell for
// character `code`, bit 7 being the leftmost pixel. The glyphs are 5x7
// capitals and digits placed in columns 1-5 and rows 0-6, so cells side by
// side keep a blank column and a blank row between characters. Lower-case
// letters use the capital glyphs; every other code, and the space, is blank.
// Purely combinational (a ROM).
// The document names this block but gives neither its size nor its glyphs;
// the cell size and the glyph shapes are this design's choices.
module font_rom (
  input  logic [6:0] code,
  input  logic [2:0] row,
  output logic [7:0] bits
);

  logic [6:0]  ucode;
  logic [63:0] glyph;   // row 0 in bits 63:56

  assign ucode = (code >= 7'h61 && code <= 7'h7A) ? (code - 7'h20) : code;

  always_comb begin
    unique case (ucode)
      7'h30: glyph = 64'h38444C5464443800;  // '0'
      7'h31: glyph = 64'h1030101010103800;  // '1'
      7'h32: glyph = 64'h3844040810207C00;  // '2'
      7'h33: glyph = 64'h7C08100804443800;  // '3'
      7'h34: glyph = 64'h081828487C080800;  // '4'
      7'h35: glyph = 64'h7C40780404443800;  // '5'
      7'h36: glyph = 64'h1820407844443800;  // '6'
      7'h37: glyph = 64'h7C04081020202000;  // '7'
      7'h38: glyph = 64'h3844443844443800;  // '8'
      7'h39: glyph = 64'h3844443C04083000;  // '9'
      7'h41: glyph = 64'h3844447C44444400;  // 'A'
      7'h42: glyph = 64'h7844447844447800;  // 'B'
      7'h43: glyph = 64'h3844404040443800;  // 'C'
      7'h44: glyph = 64'h7048444444487000;  // 'D'
      7'h45: glyph = 64'h7C40407840407C00;  // 'E'
      7'h46: glyph = 64'h7C40407840404000;  // 'F'
      7'h47: glyph = 64'h3844405C44443C00;  // 'G'
      7'h48: glyph = 64'h4444447C44444400;  // 'H'
      7'h49: glyph = 64'h3810101010103800;  // 'I'
      7'h4A: glyph = 64'h1C08080808483000;  // 'J'
      7'h4B: glyph = 64'h4448506050484400;  // 'K'
      7'h4C: glyph = 64'h4040404040407C00;  // 'L'
      7'h4D: glyph = 64'h446C545444444400;  // 'M'
      7'h4E: glyph = 64'h444464544C444400;  // 'N'
      7'h4F: glyph = 64'h3844444444443800;  // 'O'
      7'h50: glyph = 64'h7844447840404000;  // 'P'
      7'h51: glyph = 64'h3844444454483400;  // 'Q'
      7'h52: glyph = 64'h7844447850484400;  // 'R'
      7'h53: glyph = 64'h3C40403804047800;  // 'S'
      7'h54: glyph = 64'h7C10101010101000;  // 'T'
      7'h55: glyph = 64'h4444444444443800;  // 'U'
      7'h56: glyph = 64'h4444444444281000;  // 'V'
      7'h57: glyph = 64'h4444445454542800;  // 'W'
      7'h58: glyph = 64'h4444281028444400;  // 'X'
      7'h59: glyph = 64'h4444281010101000;  // 'Y'
      7'h5A: glyph = 64'h7C04081020407C00;  // 'Z'
      default: glyph = 64'h0;
    endcase
  end

  assign bits = glyph[8*(7 - row) +: 8];

endmodule
