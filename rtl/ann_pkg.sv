// ann_pkg: sizes, number formats, weight-memory address map and controller
// states shared by the 25-20-20-20-5 digit classifier.
//
// Layer sizes (25 inputs, three hidden layers of 20 neurons, 5 outputs) and
// the nine controller states S0..S8 follow the source design. The number
// formats are this design's own choice: weights are 8-bit signed with 5
// fraction bits (range -4.0 .. +3.97), activations are 16-bit signed with 8
// fraction bits, and each softmax output is a 5-bit unsigned value with 4
// fraction bits (1.0 = 5'b10000).
package ann_pkg;

  // network shape
  localparam int unsigned N_PIX = 25;  // 5x5 binary image
  localparam int unsigned N_HID = 20;  // neurons per hidden layer
  localparam int unsigned N_CLS = 5;   // digit classes 1..5

  // fixed-point formats
  localparam int unsigned W_W      = 8;   // weight width
  localparam int unsigned W_FRAC   = 5;   // weight fraction bits
  localparam int unsigned ACT_W    = 16;  // hidden activation width
  localparam int unsigned ACT_FRAC = 8;   // hidden activation fraction bits
  localparam int unsigned OUT_W    = 5;   // softmax output width
  localparam int unsigned OUT_FRAC = 4;   // softmax output fraction bits

  // accumulator widths: operand widths plus ceil(log2(terms)) growth bits
  localparam int unsigned ACC1_W = 2 + W_W + $clog2(N_PIX);      // layer 1, binary input
  localparam int unsigned ACCH_W = ACT_W + W_W + $clog2(N_HID);  // layers 2..4

  // weight memory map: layer after layer, each row-major W[out][in]
  localparam int unsigned W1_BASE = 0;
  localparam int unsigned W2_BASE = W1_BASE + N_HID * N_PIX;  // 500
  localparam int unsigned W3_BASE = W2_BASE + N_HID * N_HID;  // 900
  localparam int unsigned W4_BASE = W3_BASE + N_HID * N_HID;  // 1300
  localparam int unsigned N_WEIGHTS = W4_BASE + N_CLS * N_HID; // 1400
  localparam int unsigned WADDR_W = $clog2(N_WEIGHTS);          // 11

  // controller state, one-hot on the 10-bit step register; bit 9 is spare
  typedef enum logic [9:0] {
    S0 = 10'b00_0000_0001,  // idle: wait for start, latch the image
    S1 = 10'b00_0000_0010,  // H1' = W1 * img
    S2 = 10'b00_0000_0100,  // H1  = ReLU(H1')
    S3 = 10'b00_0000_1000,  // H2' = W2 * H1
    S4 = 10'b00_0001_0000,  // H2  = ReLU(H2')
    S5 = 10'b00_0010_0000,  // H3' = W3 * H2
    S6 = 10'b00_0100_0000,  // H3  = ReLU(H3')
    S7 = 10'b00_1000_0000,  // H4' = W4 * H3
    S8 = 10'b01_0000_0000   // Q = Softmax(H4'), done
  } step_e;

endpackage
