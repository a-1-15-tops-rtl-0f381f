// nnp_pkg: types and constants shared by the object-detection CNN processor.
//
// The processor runs only three layer types: 3x3 convolution, 1x1 convolution
// and 4x4 / stride-2 deconvolution.  Inputs, weights, BN offsets (B) and
// activations are 8 bit; partial sums and BN scales (A) are 16 bit; the
// accumulators inside a PE are 20 bit and inside a PEC 32 bit.  These widths,
// the 16 PECs x 8 PEs x 9 multipliers organisation, the 9 IN banks and the
// 16 PS banks of 16 kB x 64 bit follow the processor description.  The layer
// descriptor (cfg_t) and its encoding are this design's own choice.
package nnp_pkg;

  localparam int unsigned N_PEC     = 16;  // output-channel parallelism (co)
  localparam int unsigned N_PE      = 8;   // input-channel parallelism (ci)
  localparam int unsigned N_TAP     = 9;   // multipliers per PE (3x3 window)
  localparam int unsigned N_INBANK  = 9;   // IN memories a..i
  localparam int unsigned N_PSPAIR  = 8;   // PS memory pairs A..H
  localparam int unsigned WORD_W    = 64;  // every memory word: 8 x 8 bit
  localparam int unsigned MEM_WORDS = 2048; // 16 kB / 8 B per bank
  localparam int unsigned PROD_W    = 16;  // 8x8 product
  localparam int unsigned PE_W      = 20;  // PE adder-tree width
  localparam int unsigned ACC_W     = 32;  // PEC accumulator width
  localparam int unsigned PS_W      = 16;  // stored partial sum
  localparam int unsigned BNA_W     = 16;  // BN scale A_c
  localparam int unsigned BNB_W     = 8;   // BN offset B_c

  typedef enum logic [1:0] {
    OP_CONV3  = 2'd0,   // 3x3 convolution, stride 1 or 2, pad 0 or 1
    OP_CONV1  = 2'd1,   // 1x1 convolution, 64 input channels per pass
    OP_DECONV = 2'd2    // 4x4 deconvolution, stride 2, 2x2 outputs per position
  } op_e;

  // Weights of one PE: one 8-bit signed weight per multiplier.
  typedef logic signed [7:0] w9_t [N_TAP];

  // Everything a PEC pops from its W buffer at the start of a pass.
  typedef struct packed {
    logic [N_PE-1:0][N_TAP-1:0][7:0] w;   // w[pe][tap]
    logic signed [BNA_W-1:0]          bn_a;
    logic signed [BNB_W-1:0]          bn_b;
  } wentry_t;

  localparam int unsigned WENTRY_W = $bits(wentry_t);

  // Layer / pass descriptor, held constant by the host while a pass runs.
  typedef struct packed {
    op_e         op;
    logic        in_signed;   // only the first layer has signed inputs
    logic        stride2;     // conv3/conv1 stride 2
    logic        pad;         // conv3 zero padding of 1 pixel
    logic        first_pass;  // no partial sum to read yet
    logic        last_pass;   // apply BN, emit activations, do not store PS
    logic        bn_en;       // batch normalisation (off on the final output layers)
    logic        relu_en;     // ReLU (unsigned activation) else signed 8-bit
    logic [3:0]  ps_shift;    // 32-bit accumulator -> 16-bit partial sum: >>> ps_shift
    logic [4:0]  bn_shift;    // 32-bit BN result   -> 8-bit activation:   >>> bn_shift
    logic [3:0]  b_shift;     // B_c is aligned to the A*x product by <<< b_shift
    logic [1:0]  rd_pair;     // PS pair (within A-D / E-H) read this pass
    logic [1:0]  wr_pair;     // PS pair written this pass
    logic [9:0]  in_h;        // input feature-map height (pixels)
    logic [9:0]  in_w;        // input feature-map width  (pixels)
    logic [10:0] in_pitch;    // IN words per bank row: ceil(in_w/3) for conv3/deconv
    logic [10:0] in_base;     // IN word address of this channel group
    logic [10:0] ps_base;     // PS word address of the first output position
  } cfg_t;

  // 2-input signed saturation of a wide value to N bits is done in modules;
  // these helpers keep the rounding rule in one place.
  function automatic logic signed [PS_W-1:0] sat16(input logic signed [ACC_W-1:0] v);
    if (v > 32'sd32767)       return 16'sh7fff;
    else if (v < -32'sd32768) return 16'sh8000;
    else                      return v[PS_W-1:0];
  endfunction

endpackage
