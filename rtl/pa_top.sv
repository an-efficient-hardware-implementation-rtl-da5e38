// pa_top: the two physical-addressing interfaces side by side.
//
// fpa_bridge (Fast Physical Addressing, DMA-fed, 16-bit) is the main design;
// epa_bridge (Extended Physical Addressing, port-fed, 8-bit data / 16-bit
// new-bus address) is the simpler interface it grew from. They share no
// signals: each has its own system-bus and new-bus ports, prefixed fpa_ and
// epa_. See the two bridges for protocol and timing.
module pa_top #(
  parameter int unsigned FPA_AW  = 16,
  parameter int unsigned FPA_DW  = 16,
  parameter int unsigned EPA_HAW = 12
) (
  // Fast Physical Addressing
  input  logic              fpa_clk,
  input  logic              fpa_rst_n,
  input  logic [FPA_AW-1:0] fpa_ad_in,
  output logic [FPA_AW-1:0] fpa_ad_dma,
  output logic              fpa_ad_dma_en,
  input  logic [FPA_DW-1:0] fpa_data_in,
  input  logic              fpa_da,
  output logic [FPA_DW-1:0] fpa_data_out,
  output logic              fpa_data_out_en,
  output logic [FPA_DW-1:0] fpa_ad_out,
  output logic              fpa_ad_out_en,
  // Extended Physical Addressing
  input  logic [EPA_HAW-1:0] epa_ad_in,
  input  logic               epa_aen,
  input  logic [7:0]         epa_data_in,
  input  logic               epa_ior_n,
  input  logic               epa_iow_n,
  input  logic               epa_clk_in,
  output logic               epa_oe,
  output logic [7:0]         epa_data_out,
  output logic               epa_data_out_en,
  output logic [15:0]        epa_ad_out,
  output logic               epa_ad_out_en,
  output logic               epa_clk_out
);

  fpa_bridge #(.AW(FPA_AW), .DW(FPA_DW)) u_fpa (
    .clk         (fpa_clk),
    .rst_n       (fpa_rst_n),
    .ad_in       (fpa_ad_in),
    .ad_dma      (fpa_ad_dma),
    .ad_dma_en   (fpa_ad_dma_en),
    .data_in     (fpa_data_in),
    .da          (fpa_da),
    .data_out    (fpa_data_out),
    .data_out_en (fpa_data_out_en),
    .ad_out      (fpa_ad_out),
    .ad_out_en   (fpa_ad_out_en)
  );

  epa_bridge #(.HAW(EPA_HAW)) u_epa (
    .ad_in       (epa_ad_in),
    .aen         (epa_aen),
    .data_in     (epa_data_in),
    .ior_n       (epa_ior_n),
    .iow_n       (epa_iow_n),
    .clk_in      (epa_clk_in),
    .oe          (epa_oe),
    .data_out    (epa_data_out),
    .data_out_en (epa_data_out_en),
    .ad_out      (epa_ad_out),
    .ad_out_en   (epa_ad_out_en),
    .clk_out     (epa_clk_out)
  );

endmodule
