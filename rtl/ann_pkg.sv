// ann_pkg: types and constants shared by the character-recognition design.
//
// The network is a single-layer perceptron over a 4x4 binary grid: 16 bipolar
// inputs plus a bias, one output neuron per character that is trained at a
// time. The training data set has 20 English and 9 Arabic patterns; only three
// Arabic patterns are trained at once, so 23 output neurons are active. These
// counts follow the document. Weights are IEEE-754 single-precision numbers,
// which is this design's choice of format for the floating-point processor.
package ann_pkg;

  localparam int unsigned N_IN       = 16;           // 4x4 grid
  localparam int unsigned N_W        = N_IN + 1;     // inputs + bias
  localparam int unsigned N_ENGLISH  = 20;
  localparam int unsigned N_ARABIC   = 9;
  localparam int unsigned N_ARABIC_ACTIVE = 3;       // Arabic patterns trained at a time
  localparam int unsigned N_CHARS    = N_ENGLISH + N_ARABIC;          // 29 in the data set
  localparam int unsigned N_OUT      = N_ENGLISH + N_ARABIC_ACTIVE;   // 23 output neurons
  localparam int unsigned N_GROUPS   = N_ARABIC / N_ARABIC_ACTIVE;    // 3 Arabic groups

  localparam int unsigned CLS_W  = $clog2(N_OUT);    // neuron index width
  localparam int unsigned CHAR_W = $clog2(N_CHARS);  // data-set index width

  typedef logic [31:0] float_t;

  // single-precision constants
  localparam float_t F_ZERO = 32'h0000_0000;
  localparam float_t F_ONE  = 32'h3F80_0000;
  localparam float_t F_MONE = 32'hBF80_0000;

  // floating-point processor operations
  typedef enum logic [1:0] {
    FOP_ADD = 2'd0,   // a + b
    FOP_SUB = 2'd1,   // a - b
    FOP_MUL = 2'd2,   // a * b
    FOP_GT  = 2'd3    // flag = (a > b)
  } fop_e;

  // commands the training supervisor gives the network
  typedef enum logic [1:0] {
    ANN_INIT  = 2'd0,  // fill all weights with small random values
    ANN_EVAL  = 2'd1,  // forward pass, report the strongest neuron
    ANN_TRAIN = 2'd2   // forward pass, then perceptron update towards a target
  } ann_cmd_e;

  // supervisor state as shown on the LCD and LEDs
  typedef enum logic [1:0] {
    SYS_INIT  = 2'd0,
    SYS_TRAIN = 2'd1,
    SYS_READY = 2'd2
  } sys_state_e;

endpackage
