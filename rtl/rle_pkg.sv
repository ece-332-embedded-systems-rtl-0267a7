// rle_pkg: widths shared by the run-length compression accelerator.
//
// The bit-stream arrives in 8-bit segments (one black-and-white pixel per
// bit, first pixel in the most significant bit). Each compressed word is 24
// bits: the top bit is the bit ID (the pixel value of the run) and the lower
// 23 bits are the run length. For example 24'b1000_0000_0000_0000_0000_0111
// means "seven 1 pixels". The segment and word widths follow the lab
// handout; the bit order inside a segment is this design's reading of the
// handout's pixel-packing example.
package rle_pkg;

  // Width of one bit-stream segment written by the processor.
  localparam int unsigned SEG_W   = 8;
  // Width of the run-length field of an encoded word.
  localparam int unsigned COUNT_W = 23;

endpackage
