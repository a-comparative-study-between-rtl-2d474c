// img_pkg: constants shared by the streaming image-processing blocks.
// PIX_W is the gray-scale pixel width (8 bits, as in the 3x3 window schematic).
// IMG_W x IMG_H is the default frame, a 320x240 (QVGA) image; the line buffer
// depth of 320 words and the 76800-pixel frame both come from the source
// description, which also discusses 640-pixel lines (set IMG_W to 640 for that).
// The histograms have one bin per gray level (2**PIX_W);
// HIST_CW is the bin counter width, wide enough to count every pixel of one frame.
package img_pkg;
  localparam int PIX_W     = 8;
  localparam int IMG_W     = 320;
  localparam int IMG_H     = 240;
  localparam int HIST_CW   = $clog2(IMG_W * IMG_H + 1);  // 17 for 76800 pixels
endpackage
