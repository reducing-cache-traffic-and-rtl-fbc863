// macro_lsq: load store queue with macro data load reuse.
//
// Every load fetches the whole cache-port word (the 8-byte "macro data"
// block holding it) rather than only its own bytes, and the LSQ keeps that
// word in the load's entry. A later load whose bytes lie anywhere inside a
// saved word, or inside the bytes of an earlier store, is then served from
// the LSQ and never touches the data cache.
//
// Operation, one memory instruction accepted per cycle in program order:
//   cycle 0  the LSQ is searched (partial match) and an entry allocated.
//            A store writes its lane-placed data into its entry and
//            invalidates overlapping entries. A load that hits copies the
//            reused word into its own entry (entry present at once); a
//            load that misses gets an entry with P clear.
//   cycle 1  hit: the reused word goes through the alignment unit onto
//            the reuse result bus (reuse latency 1 cycle).
//            miss: the cache read is issued for the load's 8-byte block.
//            store: the store is written to the cache through the second
//            cache port.
//   cycle 1+CACHE_LAT  miss: the word from the cache port is aligned
//            onto the cache result bus and written into the load's entry
//            (LSQ update path), which sets P.
// The cache is only accessed after the LSQ lookup, so a load that misses
// takes 1 + CACHE_LAT cycles; a load served from the LSQ takes 1.
//
// Interface: req_* carries a memory instruction with its effective
// address; rr_* is the reuse result bus and cr_* the cache load result
// bus, both carrying the instruction's tag; dc_rd_* is the load port of
// the dual-ported data cache, which must answer every read exactly
// CACHE_LAT cycles later, and dc_wr_* its store port. Accesses must be
// naturally aligned.
//
// Taken from the published design: macro loads, the LSQ structure of tag CAM plus data
// storage, reuse and update data paths, serialized lookup before cache
// access, 64 entries, 1-cycle reuse and 2-cycle cache latency. Own
// choices: the in-order, one-per-cycle issue, stores writing the cache as
// they are accepted (the instruction stream is taken as non-speculative),
// the two result buses, copying the reused word into a hitting load's
// entry, and reset behaviour.
module macro_lsq
  import mdl_pkg::*;
#(
  parameter int unsigned ENTRIES   = 64,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned TAG_W     = 7,
  parameter int unsigned CACHE_LAT = 2,
  localparam int unsigned IDX_W    = $clog2(ENTRIES),
  localparam int unsigned BLK_W    = ADDR_W - OFS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // memory instructions from the load/store units
  input  logic              req_valid_i,
  input  logic              req_store_i,
  input  logic [ADDR_W-1:0] req_addr_i,
  input  mem_size_e         req_size_i,
  input  logic              req_signed_i,
  input  macro_t            req_wdata_i,
  input  logic [TAG_W-1:0]  req_tag_i,
  // reuse result bus
  output logic              rr_valid_o,
  output logic [TAG_W-1:0]  rr_tag_o,
  output macro_t            rr_data_o,
  output reuse_src_e        rr_src_o,
  // cache load result bus
  output logic              cr_valid_o,
  output logic [TAG_W-1:0]  cr_tag_o,
  output macro_t            cr_data_o,
  // data cache, load port
  output logic              dc_rd_valid_o,
  output logic [ADDR_W-1:0] dc_rd_addr_o,
  input  logic              dc_rd_rvalid_i,
  input  macro_t            dc_rd_data_i,
  // data cache, store port
  output logic              dc_wr_valid_o,
  output logic [ADDR_W-1:0] dc_wr_addr_o,
  output macro_t            dc_wr_data_o,
  output bmask_t            dc_wr_be_o
);

  // Decoded request.
  logic [OFS_W-1:0] q_ofs;
  logic [BLK_W-1:0] q_blk;
  bmask_t           q_mask;
  logic             q_load, q_store;

  assign q_ofs   = req_addr_i[OFS_W-1:0];
  assign q_blk   = req_addr_i[ADDR_W-1:OFS_W];
  assign q_mask  = byte_mask(q_ofs, req_size_i);
  assign q_load  = req_valid_i && !req_store_i;
  assign q_store = req_valid_i &&  req_store_i;

  // Tag CAM.
  logic             hit, hit_sl;
  logic [IDX_W-1:0] hit_idx, alloc_idx;
  bmask_t           hit_mask;
  logic             lookup_hit;
  logic             fill;
  logic [IDX_W-1:0] fill_idx;

  assign lookup_hit = q_load && hit;

  lsq_tag_cam #(.ENTRIES(ENTRIES), .ADDR_W(ADDR_W)) u_tag (
    .clk, .rst_n,
    .srch_blk_i      (q_blk),
    .srch_mask_i     (q_mask),
    .hit_o           (hit),
    .hit_idx_o       (hit_idx),
    .hit_sl_o        (hit_sl),
    .hit_mask_o      (hit_mask),
    .alloc_i         (req_valid_i),
    .alloc_sl_i      (req_store_i),
    .alloc_blk_i     (q_blk),
    .alloc_mask_i    (req_store_i ? q_mask : (hit ? hit_mask : '1)),
    .alloc_present_i (req_store_i || hit),
    .alloc_idx_o     (alloc_idx),
    .fill_i          (fill),
    .fill_idx_i      (fill_idx)
  );

  // Data storage: allocation write (store data path or reuse copy) and
  // update write from the cache port.
  macro_t reuse_word;

  lsq_data_array #(.ENTRIES(ENTRIES)) u_data (
    .clk,
    .wa_en_i   (q_store || lookup_hit),
    .wa_idx_i  (alloc_idx),
    .wa_data_i (req_store_i ? place_lanes(req_wdata_i, q_ofs) : reuse_word),
    .wb_en_i   (fill),
    .wb_idx_i  (fill_idx),
    .wb_data_i (dc_rd_data_i),
    .rd_idx_i  (hit_idx),
    .rd_data_o (reuse_word)
  );

  // Stage 1 registers.
  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [OFS_W-1:0] ofs;
    mem_size_e        size;
    logic             sgn;
  } ld_info_t;

  typedef struct packed {
    ld_info_t         ld;
    logic [BLK_W-1:0] blk;
    logic [IDX_W-1:0] idx;
  } miss_info_t;

  ld_info_t   s1_hit;
  macro_t     s1_word;
  reuse_src_e s1_src;
  miss_info_t s1_miss;
  miss_info_t pend [CACHE_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_hit        <= '0;
      s1_word       <= '0;
      s1_src        <= SRC_NONE;
      s1_miss       <= '0;
      for (int i = 0; i < CACHE_LAT; i++) pend[i] <= '0;
      dc_wr_valid_o <= 1'b0;
      dc_wr_addr_o  <= '0;
      dc_wr_data_o  <= '0;
      dc_wr_be_o    <= '0;
    end else begin
      s1_hit       <= '{valid: lookup_hit, tag: req_tag_i, ofs: q_ofs,
                        size: req_size_i, sgn: req_signed_i};
      s1_word      <= reuse_word;
      s1_src       <= lookup_hit ? (hit_sl ? SRC_STORE : SRC_LOAD) : SRC_NONE;
      s1_miss.ld   <= '{valid: q_load && !hit, tag: req_tag_i, ofs: q_ofs,
                        size: req_size_i, sgn: req_signed_i};
      s1_miss.blk  <= q_blk;
      s1_miss.idx  <= alloc_idx;
      pend[0]      <= s1_miss;
      for (int i = 1; i < CACHE_LAT; i++) pend[i] <= pend[i-1];
      dc_wr_valid_o <= q_store;
      dc_wr_addr_o  <= {q_blk, {OFS_W{1'b0}}};
      dc_wr_data_o  <= place_lanes(req_wdata_i, q_ofs);
      dc_wr_be_o    <= q_mask;
    end
  end

  // Reuse data path.
  assign rr_valid_o = s1_hit.valid;
  assign rr_tag_o   = s1_hit.tag;
  assign rr_src_o   = s1_src;

  data_align u_align_reuse (
    .macro_i  (s1_word),
    .ofs_i    (s1_hit.ofs),
    .size_i   (s1_hit.size),
    .signed_i (s1_hit.sgn),
    .data_o   (rr_data_o)
  );

  // Cache access, issued after the lookup missed.
  assign dc_rd_valid_o = s1_miss.ld.valid;
  assign dc_rd_addr_o  = {s1_miss.blk, {OFS_W{1'b0}}};

  // Normal load data path and LSQ update path.
  ld_info_t ret;
  assign ret        = pend[CACHE_LAT-1].ld;
  assign fill       = dc_rd_rvalid_i;
  assign fill_idx   = pend[CACHE_LAT-1].idx;
  assign cr_valid_o = dc_rd_rvalid_i;
  assign cr_tag_o   = ret.tag;

  data_align u_align_cache (
    .macro_i  (dc_rd_data_i),
    .ofs_i    (ret.ofs),
    .size_i   (ret.size),
    .signed_i (ret.sgn),
    .data_o   (cr_data_o)
  );

  // The cache answers each read exactly CACHE_LAT cycles after it was issued.
  assert property (@(posedge clk) disable iff (!rst_n) dc_rd_rvalid_i == ret.valid);
  // Only naturally aligned accesses are supported.
  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid_i |-> is_aligned(q_ofs, req_size_i));

endmodule
