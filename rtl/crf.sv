// crf: constant register file of the accelerator.
//
// Holds the configuration the host writes before a run: image X dimension,
// Y dimension and the Sobel edge threshold (register map in rzla_pkg).
// Writes take effect at the rising edge with we high; the contents are read
// continuously through the cfg struct. Reset values (64 x 64, threshold 128)
// are this design's choice; the register width is 16 bits.
module crf
  import rzla_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [1:0]       addr,
  input  logic [CRF_W-1:0] wdata,
  output crf_t             cfg
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg.x_dim     <= 16'd64;
      cfg.y_dim     <= 16'd64;
      cfg.threshold <= 16'd128;
    end else if (we) begin
      unique case (crf_addr_e'(addr))
        CRF_XDIM:   cfg.x_dim     <= wdata;
        CRF_YDIM:   cfg.y_dim     <= wdata;
        CRF_THRESH: cfg.threshold <= wdata;
        default: ;
      endcase
    end
  end
endmodule
