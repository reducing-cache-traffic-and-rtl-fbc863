// mdl_top: macro data load design, top level.
//
// Two parts stand side by side:
//   u_lsq   the load store queue with macro data reuse, between the
//           processor's load/store units (req_*), its result buses
//           (rr_* for values reused from the LSQ, cr_* for values from
//           the cache) and the two ports of the L1 data cache (dc_rd_*,
//           dc_wr_*). The cache itself, and the processor, are outside.
//   u_mvrt  the memory value reuse table, fed with a stream of memory
//           instructions (mv_in_*) and reporting for each load whether it
//           could have reused an earlier value, and of which kind.
// See macro_lsq and mvrt for timing. Default sizes: 64 LSQ entries,
// 2-cycle cache, 256 MVRT entries, 32-bit addresses, 64-bit macro data.
module mdl_top
  import mdl_pkg::*;
#(
  parameter int unsigned LSQ_ENTRIES  = 64,
  parameter int unsigned MVRT_ENTRIES = 256,
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned TAG_W        = 7,
  parameter int unsigned CACHE_LAT    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // LSQ: memory instructions
  input  logic              req_valid_i,
  input  logic              req_store_i,
  input  logic [ADDR_W-1:0] req_addr_i,
  input  mem_size_e         req_size_i,
  input  logic              req_signed_i,
  input  macro_t            req_wdata_i,
  input  logic [TAG_W-1:0]  req_tag_i,
  // LSQ: result buses
  output logic              rr_valid_o,
  output logic [TAG_W-1:0]  rr_tag_o,
  output macro_t            rr_data_o,
  output reuse_src_e        rr_src_o,
  output logic              cr_valid_o,
  output logic [TAG_W-1:0]  cr_tag_o,
  output macro_t            cr_data_o,
  // LSQ: data cache ports
  output logic              dc_rd_valid_o,
  output logic [ADDR_W-1:0] dc_rd_addr_o,
  input  logic              dc_rd_rvalid_i,
  input  macro_t            dc_rd_data_i,
  output logic              dc_wr_valid_o,
  output logic [ADDR_W-1:0] dc_wr_addr_o,
  output macro_t            dc_wr_data_o,
  output bmask_t            dc_wr_be_o,
  // MVRT
  input  logic              mv_macro_en_i,
  input  logic              mv_in_valid_i,
  input  logic              mv_in_store_i,
  input  logic [ADDR_W-1:0] mv_in_addr_i,
  input  mem_size_e         mv_in_size_i,
  input  macro_t            mv_in_value_i,
  output logic              mv_out_valid_o,
  output logic              mv_out_hit_o,
  output logic              mv_out_s2l_o,
  output logic              mv_out_l2l_o,
  output logic              mv_out_ml_o,
  output macro_t            mv_out_data_o
);

  macro_lsq #(
    .ENTRIES(LSQ_ENTRIES), .ADDR_W(ADDR_W), .TAG_W(TAG_W), .CACHE_LAT(CACHE_LAT)
  ) u_lsq (
    .clk, .rst_n,
    .req_valid_i, .req_store_i, .req_addr_i, .req_size_i, .req_signed_i,
    .req_wdata_i, .req_tag_i,
    .rr_valid_o, .rr_tag_o, .rr_data_o, .rr_src_o,
    .cr_valid_o, .cr_tag_o, .cr_data_o,
    .dc_rd_valid_o, .dc_rd_addr_o, .dc_rd_rvalid_i, .dc_rd_data_i,
    .dc_wr_valid_o, .dc_wr_addr_o, .dc_wr_data_o, .dc_wr_be_o
  );

  mvrt #(.ENTRIES(MVRT_ENTRIES), .ADDR_W(ADDR_W)) u_mvrt (
    .clk, .rst_n,
    .macro_en_i  (mv_macro_en_i),
    .in_valid_i  (mv_in_valid_i),
    .in_store_i  (mv_in_store_i),
    .in_addr_i   (mv_in_addr_i),
    .in_size_i   (mv_in_size_i),
    .in_value_i  (mv_in_value_i),
    .out_valid_o (mv_out_valid_o),
    .out_hit_o   (mv_out_hit_o),
    .out_s2l_o   (mv_out_s2l_o),
    .out_l2l_o   (mv_out_l2l_o),
    .out_ml_o    (mv_out_ml_o),
    .out_data_o  (mv_out_data_o)
  );

endmodule
