// Shared constants and types of the spike-sorting accelerator.
//
// The accelerator sorts spikes by two 6-bit features, the peak voltage and the
// hyperpolarisation voltage. Both features share one 64-bin histogram, up to 7
// boundaries split each feature axis into 8 regions, so a spike lands on a grid
// cell named by two 3-bit region indexes. Up to 8 grid cells are remembered as
// clusters in a small CAM. The sizes here are the ones the original design
// gives; the command-bit positions follow its bus interface, and the state
// encodings are this implementation's own.
package spks_pkg;

  localparam int unsigned FEAT_W  = 6;              // bits per feature
  localparam int unsigned DEPTH   = 1 << FEAT_W;    // histogram bins
  localparam int unsigned CNT_W   = 16;             // histogram word width
  localparam int unsigned NB      = 7;              // boundaries per axis
  localparam int unsigned IDX_W   = 3;              // region index width
  localparam int unsigned NC      = 8;              // cluster CAM entries
  localparam int unsigned LAP_OFFSET = 8;           // Laplacian threshold offset

  // Bit positions of the command word carried in the bus write address.
  localparam int unsigned CMD_CLEAR   = 0;
  localparam int unsigned CMD_LAPLACE = 1;
  localparam int unsigned CMD_UPDATE  = 2;
  localparam int unsigned CMD_LEAK    = 3;
  localparam int unsigned CMD_KER     = 4;
  localparam int unsigned ADDR_SEL    = 5;          // read-data debug select

  // Grid cell of a spike: region index on the peak and hyperpolarisation axes.
  typedef struct packed {
    logic [IDX_W-1:0] p;
    logic [IDX_W-1:0] h;
  } grid_t;

  // Usefulness of one cluster CAM entry.
  typedef enum logic [1:0] {
    U_FREE    = 2'd0,
    U_OUTLIER = 2'd1,
    U_WEAK    = 2'd2,
    U_STRONG  = 2'd3
  } use_t;

  // One-cycle command strobes derived from a bus write.
  typedef struct packed {
    logic ker;
    logic leak;
    logic update;
    logic laplace;
    logic clear;
  } cmd_t;

endpackage
