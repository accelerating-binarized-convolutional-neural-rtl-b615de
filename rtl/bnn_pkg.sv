// Shared types and constants of the binarized CNN accelerator.
//
// Values are binarized with the encoding +1 -> 0 and -1 -> 1, so a product of two
// values is their XOR and a dot product over N terms is N - 2*popcount(a ^ w).
// A data word holds WORD pixels of one feature map in raster order; a data buffer
// row holds F_IN such words side by side (one per lane), so one read feeds all
// convolvers. The layer table BNN_CIFAR10 is the 6-conv / 3-dense CIFAR-10
// network run layer by layer on the shared compute units.
//
// Batch-norm word (one per output map or neuron, first word of its weights in the
// weight stream): bits [15:0] signed threshold T, bit 16 flip. The output is +1
// when sum >= T (flip = 0) or sum <= T (flip = 1), which is batch norm followed by
// the sign function folded into one comparison.
// The +1 -> 0 / -1 -> 1 encoding and the layer counts follow the published
// accelerator; the word size, widths, batch-norm word and channel counts are this
// design's choices.
package bnn_pkg;

  localparam int WORD      = 64;   // pixel parallelization factor (bits per word)
  localparam int F_IN_DEF  = 8;    // default input parallelization factor
  localparam int IMG_W     = 32;   // CIFAR-10 image width and height
  localparam int IMG_C     = 3;    // image channels
  localparam int PIX_W     = 8;    // bits per quantized input pixel (signed)
  localparam int SUM_W     = 16;   // integer partial-sum width
  localparam int MAX_CIN   = 8192; // largest fan-in of any layer
  localparam int DBUF_WORDS = 2048; // words per data buffer: 128 maps of 32x32

  typedef enum logic [1:0] {
    L_FPCONV  = 2'd0,
    L_BINCONV = 2'd1,
    L_BINFC   = 2'd2
  } layer_kind_t;

  typedef struct packed {
    layer_kind_t kind;
    logic [13:0] cin;     // input maps (conv) or input bits (dense)
    logic [13:0] cout;    // output maps or neurons
    logic [5:0]  width;   // input feature map width (conv layers)
    logic        pool;    // 2x2 max pooling after this conv layer
    logic        last;    // final layer: integer class scores, no binarization
  } layer_t;

  typedef struct packed {
    logic                    flip;
    logic signed [SUM_W-1:0] thr;
  } bn_t;

  function automatic bn_t bn_from_word(input logic [WORD-1:0] w);
    bn_t b;
    b.thr  = w[SUM_W-1:0];
    b.flip = w[16];
    return b;
  endfunction

  function automatic layer_t mk_layer(layer_kind_t k, int cin, int cout, int width,
                                      bit pool, bit last);
    layer_t l;
    l.kind  = k;
    l.cin   = 14'(cin);
    l.cout  = 14'(cout);
    l.width = 6'(width);
    l.pool  = pool;
    l.last  = last;
    return l;
  endfunction

  localparam int NL_BNN = 9;
  // Entry 0 is the first layer executed.
  localparam layer_t [NL_BNN-1:0] BNN_CIFAR10 = {
    mk_layer(L_BINFC,   1024,   10,  1, 1'b0, 1'b1),
    mk_layer(L_BINFC,   1024, 1024,  1, 1'b0, 1'b0),
    mk_layer(L_BINFC,   8192, 1024,  1, 1'b0, 1'b0),
    mk_layer(L_BINCONV,  512,  512,  8, 1'b1, 1'b0),
    mk_layer(L_BINCONV,  256,  512,  8, 1'b0, 1'b0),
    mk_layer(L_BINCONV,  256,  256, 16, 1'b1, 1'b0),
    mk_layer(L_BINCONV,  128,  256, 16, 1'b0, 1'b0),
    mk_layer(L_BINCONV,  128,  128, 32, 1'b1, 1'b0),
    mk_layer(L_FPCONV,     3,  128, 32, 1'b0, 1'b0)
  };

endpackage
