// digit_rom: read-only memory of the ten 16x16 digit pictures used for the
// time, speed and volume numbers.
//
// As in the document, digit d occupies addresses d*256 .. d*256+255, row by
// row (address = d*256 + row*16 + column), so showing a digit means reading
// from its digit number times 256 plus the pixel offset. The document's
// pictures are pre-drawn images that are not reproduced here; this ROM is
// filled at elaboration with seven-segment style glyphs (segments two pixels
// thick inside the 16x16 cell). Each word is one pixel: 1 = ink.
// Timing: registered read, data one clock after the address (as a block RAM).
module digit_rom (
  input  logic        clk,
  input  logic [11:0] addr,     // digit*256 + row*16 + col, digits 0..9
  output logic        pixel
);

  typedef logic rom_t [2560];

  // segment set of each digit, {g, f, e, d, c, b, a}
  function automatic logic [6:0] segments(input int d);
    case (d)
      0: return 7'b0111111;  1: return 7'b0000110;  2: return 7'b1011011;
      3: return 7'b1001111;  4: return 7'b1100110;  5: return 7'b1101101;
      6: return 7'b1111101;  7: return 7'b0000111;  8: return 7'b1111111;
      default: return 7'b1101111;
    endcase
  endfunction

  function automatic rom_t make_rom();
    rom_t r;
    for (int d = 0; d < 10; d++)
      for (int row = 0; row < 16; row++)
        for (int col = 0; col < 16; col++) begin
          logic [6:0] s;
          logic       horiz, top_v, bot_v;
          s     = segments(d);
          horiz = (col >= 3 && col <= 12);
          top_v = (row >= 2 && row <= 7);
          bot_v = (row >= 8 && row <= 13);
          r[d*256 + row*16 + col] =
              (s[0] && horiz && (row == 1  || row == 2))  ||   // a
              (s[1] && top_v && (col == 12 || col == 13)) ||   // b
              (s[2] && bot_v && (col == 12 || col == 13)) ||   // c
              (s[3] && horiz && (row == 13 || row == 14)) ||   // d
              (s[4] && bot_v && (col == 2  || col == 3))  ||   // e
              (s[5] && top_v && (col == 2  || col == 3))  ||   // f
              (s[6] && horiz && (row == 7  || row == 8));      // g
        end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  always_ff @(posedge clk) begin
    pixel <= (addr < 12'd2560) ? ROM[addr] : 1'b0;
  end

endmodule
