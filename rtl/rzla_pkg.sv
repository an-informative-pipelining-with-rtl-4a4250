// rzla_pkg: types and constants shared by the Razor loop accelerator (RZLA).
// Pixels are 8-bit grey values and configuration registers are 16 bits wide;
// both widths are this design's choice. The CRF register map (X dimension,
// Y dimension, edge threshold) follows the accelerator's configuration
// contents; the addresses are this design's choice.
package rzla_pkg;
  localparam int PIX_W   = 8;
  localparam int CRF_W   = 16;
  // Latency from an SRF push to the cycle the store queue captures its result.
  localparam int PIPE_LAT = 3;

  typedef enum logic [1:0] {
    CRF_XDIM   = 2'd0,
    CRF_YDIM   = 2'd1,
    CRF_THRESH = 2'd2
  } crf_addr_e;

  typedef struct packed {
    logic [CRF_W-1:0] x_dim;
    logic [CRF_W-1:0] y_dim;
    logic [CRF_W-1:0] threshold;
  } crf_t;

  typedef logic [PIX_W-1:0] pix_t;

  // Edge-map byte values.
  localparam pix_t EDGE_ON  = 8'hFF;
  localparam pix_t EDGE_OFF = 8'h00;
endpackage
