// cube_sprites_pkg: the four animation frames of the ball image.
//
// Each frame is 32 rows of 16 pixels, row 0 at the top; in each 16-bit
// word bit 15 is the leftmost pixel and a 1 is a lit pixel. The frames
// show a cube turning about its vertical axis and are played in order
// 0, 1, 2, 3. Frames 0 and 1 are the original bitmaps. Frame 2 is the
// original bitmap completed, and frame 3 reconstructed, from a printed
// picture of the four frames sampled once per pixel; these two may
// differ from the originals by a pixel here and there.
package cube_sprites_pkg;

  localparam int unsigned FRAMES = 4;
  localparam int unsigned ROWS   = 32;
  localparam int unsigned COLS   = 16;

  localparam logic [15:0] CUBE [FRAMES][ROWS] = '{
    // frame 0
    '{
      16'b00000001_10000000,
      16'b00000011_11000000,
      16'b00000110_01100000,
      16'b00001100_00110000,
      16'b00011000_00011000,
      16'b00110000_00001100,
      16'b01100000_00000110,
      16'b11000000_00000011,
      16'b11100000_00000111,
      16'b10110000_00001101,
      16'b10011000_00011001,
      16'b10001100_00110001,
      16'b10000110_01100001,
      16'b10000011_11000001,
      16'b10000001_10000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b10000001_00000001,
      16'b11000001_00000011,
      16'b01100001_00000110,
      16'b00110001_00001100,
      16'b00011001_00011000,
      16'b00001101_00110000,
      16'b00000111_01100000,
      16'b00000011_11000000,
      16'b00000001_10000000
    },
    // frame 1
    '{
      16'b00000110_00000000,
      16'b00000111_10000000,
      16'b00000100_01110000,
      16'b00001000_00011100,
      16'b00001000_00000010,
      16'b00001000_00000010,
      16'b00010000_00000110,
      16'b00010000_00000110,
      16'b00100000_00001010,
      16'b00100000_00001010,
      16'b01100000_00001010,
      16'b01111000_00010010,
      16'b01000111_00010010,
      16'b01000001_11100010,
      16'b01000000_00100010,
      16'b01000000_00100010,
      16'b01000000_00100010,
      16'b01000000_00100010,
      16'b01000000_00100010,
      16'b01000000_00100010,
      16'b01000000_00100010,
      16'b01000000_00100100,
      16'b01000000_00100100,
      16'b01000000_00101000,
      16'b01100000_00101000,
      16'b00111000_00101000,
      16'b00000111_00110000,
      16'b00000001_11110000,
      16'b00000000_00100000,
      16'b00000000_00000000,
      16'b00000000_00000000,
      16'b00000000_00000000
    },
    // frame 2
    '{
      16'b00000000_00000000,
      16'b00000001_11111000,
      16'b00111111_00001000,
      16'b00110000_00001000,
      16'b00110000_00001000,
      16'b00110000_00001000,
      16'b00110000_00001000,
      16'b00110000_00001000,
      16'b00110000_00001000,
      16'b00110000_00000100,
      16'b00101000_00000100,
      16'b00101000_00000100,
      16'b00101000_01111100,
      16'b00101111_10000100,
      16'b00101000_00000100,
      16'b00101000_00000100,
      16'b00101000_00000100,
      16'b00101000_00000100,
      16'b00101000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00011000_00000100,
      16'b00001000_01111100,
      16'b00001111_10000000,
      16'b00000000_00000000,
      16'b00000000_00000000
    },
    // frame 3
    '{
      16'b00000000_00010000,
      16'b00000000_11110000,
      16'b00000111_10001000,
      16'b00111000_00001000,
      16'b01100000_00000100,
      16'b01100000_00000100,
      16'b01100000_00000100,
      16'b01010000_00000010,
      16'b01010000_00000010,
      16'b01001000_00000001,
      16'b01001000_00000001,
      16'b01001000_00001111,
      16'b01000100_00111001,
      16'b01000111_11000001,
      16'b01000111_00000001,
      16'b01000100_00000001,
      16'b01000100_00000001,
      16'b01000100_00000001,
      16'b01000100_00000001,
      16'b01000100_00000001,
      16'b01000100_00000001,
      16'b00100100_00000001,
      16'b00100100_00000001,
      16'b00100100_00000001,
      16'b00010100_00000001,
      16'b00010100_00000001,
      16'b00010100_00000001,
      16'b00001100_00001110,
      16'b00001100_00111000,
      16'b00000111_11000000,
      16'b00000111_00000000,
      16'b00000000_00000000
    }
  };

endpackage
