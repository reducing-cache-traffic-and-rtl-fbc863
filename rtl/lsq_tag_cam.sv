// lsq_tag_cam: address-matching tag part of the load store queue.
//
// Each entry holds a tag for one memory instruction: the address of the
// 8-byte macro block it touched, the byte lanes of that block whose value
// the data storage holds, and three status bits: V (valid, the data is
// up to date), P (data present) and SL (1 = store, 0 = load). Entries are
// allocated in program order from a circular head pointer; an entry is not
// freed when its instruction retires but stays valid, and so usable for
// reuse, until it is overwritten or a store makes it stale.
//
// Partial-match search: a load hits an entry whose block address equals
// its own and whose byte lanes include all of the load's lanes, so a load
// of a few bytes can hit an 8-byte macro word saved by an earlier load at
// a different low address. Only entries with V and P set can hit. Among
// several hits the lowest-numbered entry is reported; all valid entries
// hold current data, so any hit is correct.
//
// Store invalidation: when a store is allocated, every other valid entry
// of the same block whose lanes overlap the store's lanes is invalidated.
// Fill: the LSQ update path sets P of an entry whose macro word has just
// arrived from the cache, if the entry is still valid.
//
// Timing: search is combinational; allocation, invalidation and fill take
// effect at the clock edge. alloc_idx_o shows the entry the next
// allocation will use.
//
// Taken from the published design: the CAM, V/P/SL bits, the
// partial-match search, keeping V on while the data is current, FIFO
// replacement and invalidation of overlapping entries on a store (the
// rule of the reuse table). Own
// choices: the byte-lane mask as the match key, lowest-index priority and
// the reset behaviour (all entries invalid).
module lsq_tag_cam
  import mdl_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned ADDR_W  = 32,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned BLK_W  = ADDR_W - OFS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // partial-match search (loads)
  input  logic [BLK_W-1:0] srch_blk_i,
  input  bmask_t           srch_mask_i,
  output logic             hit_o,
  output logic [IDX_W-1:0] hit_idx_o,
  output logic             hit_sl_o,
  output bmask_t           hit_mask_o,
  // allocation (every memory instruction, in program order)
  input  logic             alloc_i,
  input  logic             alloc_sl_i,
  input  logic [BLK_W-1:0] alloc_blk_i,
  input  bmask_t           alloc_mask_i,
  input  logic             alloc_present_i,
  output logic [IDX_W-1:0] alloc_idx_o,
  // fill (LSQ update path)
  input  logic             fill_i,
  input  logic [IDX_W-1:0] fill_idx_i
);

  typedef struct packed {
    logic             v;
    logic             p;
    logic             sl;
    logic [BLK_W-1:0] blk;
    bmask_t           mask;
  } tag_t;

  tag_t             tags [ENTRIES];
  logic [IDX_W-1:0] head;
  logic [ENTRIES-1:0] match;

  assign alloc_idx_o = head;

  // Partial-match search.
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      match[i] = tags[i].v && tags[i].p && (tags[i].blk == srch_blk_i)
                 && covers(tags[i].mask, srch_mask_i);
    end
    hit_o      = 1'b0;
    hit_idx_o  = '0;
    hit_sl_o   = 1'b0;
    hit_mask_o = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit_o      = 1'b1;
        hit_idx_o  = IDX_W'(i);
        hit_sl_o   = tags[i].sl;
        hit_mask_o = tags[i].mask;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      for (int i = 0; i < ENTRIES; i++) tags[i] <= '0;
    end else begin
      if (fill_i && tags[fill_idx_i].v) tags[fill_idx_i].p <= 1'b1;
      if (alloc_i && alloc_sl_i) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (tags[i].v && (tags[i].blk == alloc_blk_i) && ((tags[i].mask & alloc_mask_i) != '0))
            tags[i].v <= 1'b0;
        end
      end
      if (alloc_i) begin
        tags[head] <= '{v: 1'b1, p: alloc_present_i, sl: alloc_sl_i,
                        blk: alloc_blk_i, mask: alloc_mask_i};
        head       <= (head == IDX_W'(ENTRIES - 1)) ? '0 : head + 1'b1;
      end
    end
  end

  // The update path only ever fills an entry that is not being allocated.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (fill_i && alloc_i) |-> (fill_idx_i != head));

endmodule
