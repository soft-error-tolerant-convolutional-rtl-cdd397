// ensemble_pkg: types and constants shared by the ensemble CNN system.
//
// The system classifies CIFAR-10 images with an ensemble of base ResNet
// accelerators. Each accelerator computes with 8-bit integer data and weights
// and delivers ten class scores per image; a robust combiner merges them.
// Ten classes, 8-bit data and the 200 MHz time windows derived from the
// measured per-image processing times (ResNet 20/32/44/56: 3.2/4.8/6.7/8.3 ms)
// follow the published design; the clock frequency, the +/-5 % window width
// and the score format (unsigned 8-bit, higher means more likely) are this
// implementation's own choices.
package ensemble_pkg;

  localparam int NUM_CLASSES = 10;           // CIFAR-10 categories
  localparam int LABEL_W     = 4;            // label 0..9
  localparam int DATA_W      = 8;            // int8 feature maps and weights
  localparam int SCORE_W     = 8;            // unsigned class score
  localparam int MAX_NETS    = 4;            // largest ensemble evaluated (20+32+44+56)
  localparam int SUM_W       = SCORE_W + $clog2(MAX_NETS);  // sum of up to 4 scores
  localparam int TIMER_W     = 21;           // holds 1.743e6 cycles (8.7 ms at 200 MHz)

  typedef logic        [SCORE_W-1:0] score_t;
  typedef logic        [SUM_W-1:0]   sum_t;
  typedef logic        [LABEL_W-1:0] label_t;
  typedef logic signed [DATA_W-1:0]  data_t;

  // Normal time windows (cycles from image start to the first score word),
  // nominal processing time +/-5 % at an assumed 200 MHz clock, in the order
  // ResNet 20, 32, 44, 56.
  localparam int unsigned DEF_T_MIN [MAX_NETS] = '{608000, 912000, 1273000, 1577000};
  localparam int unsigned DEF_T_MAX [MAX_NETS] = '{672000, 1008000, 1407000, 1743000};

  // Consecutive-mismatch threshold C_T of the combiner.
  localparam int DEF_C_T = 4;

  // AXI4 read channels of the instruction fetch path. The Zynq-7000
  // general-purpose ports are 32 bits wide.
  localparam int AXI_ADDR_W = 32;
  localparam int AXI_DATA_W = 32;
  localparam int AXI_ID_W   = 4;
  localparam int NUM_GP     = 2;   // general-purpose ports of the processing system

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;    // beats - 1
    logic [2:0]            size;
    logic [1:0]            burst;
  } axi_ar_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_DATA_W-1:0] data;
    logic [1:0]            resp;
    logic                  last;
  } axi_r_t;

  // Which accelerator uses which slot of which general-purpose port (-1: none).
  // Three networks: the two smaller ones (ResNet 20, 32) share port 0, the
  // largest (ResNet 44) has port 1. For four networks (20, 32, 44, 56) set
  // '{'{1, 2}, '{0, 3}}: 32 and 44 share one port, 20 and 56 the other.
  localparam int DEF_GP_SLOT [NUM_GP][2] = '{'{0, 1}, '{2, -1}};

endpackage
