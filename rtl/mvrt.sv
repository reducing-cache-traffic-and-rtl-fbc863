// mvrt: memory value reuse table.
//
// A table that measures how many loads could take their value from an
// earlier memory instruction instead of the cache. Every memory
// instruction is recorded in a new entry (address, value, type), with
// entries replaced oldest first. A store first invalidates every entry
// whose bytes it overlaps. A load searches the table for a valid entry
// holding all of its bytes; if there is one, the load is redundant and
// its value is reported, along with the kind of reuse:
//   S2L  an earlier store holds the bytes (store-to-load),
//   L2L  an earlier load read exactly those bytes or more of them
//        (load-to-load),
//   ML   only the full 8-byte macro word saved by an earlier load holds
//        them (the extra reuse macro data loads give).
// With macro_en_i low the table runs without macro data loads: a load
// entry keeps only its own bytes and ML never occurs. With macro_en_i
// high a load entry keeps the whole 8-byte block, which also makes a store
// to any byte of that block invalidate it. macro_en_i must not change
// while the table holds entries (reset between modes).
//
// Interface: one instruction per cycle on in_*; for a load, in_value_i is
// the whole aligned 8-byte word holding it, for a store the store data in
// its low bytes. The verdict for a load appears on out_* one cycle later;
// out_data_o is the reused value, zero-extended.
//
// Taken from the published design: FIFO allocation and replacement, store invalidation by
// address overlap, search of valid entries for a load, the S2L/L2L/ML
// classes and 256 entries as the main size (16 to 256 studied). Own
// choices: byte-mask containment as "matching address", lowest-index
// priority and the one-cycle registered verdict.
module mvrt
  import mdl_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned ADDR_W  = 32,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned BLK_W  = ADDR_W - OFS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              macro_en_i,
  input  logic              in_valid_i,
  input  logic              in_store_i,
  input  logic [ADDR_W-1:0] in_addr_i,
  input  mem_size_e         in_size_i,
  input  macro_t            in_value_i,
  output logic              out_valid_o,   // a load was looked up
  output logic              out_hit_o,     // it found its value
  output logic              out_s2l_o,
  output logic              out_l2l_o,
  output logic              out_ml_o,
  output macro_t            out_data_o
);

  // Entry fields other than the valid bit are only ever written at the
  // allocation pointer; the valid bits are a vector of their own, since a
  // store may clear any number of them at once.
  typedef struct packed {
    logic             st;
    logic [BLK_W-1:0] blk;
    bmask_t           mask;   // bytes whose value the entry holds
    bmask_t           own;    // bytes the instruction itself accessed
    macro_t           data;   // lane-placed value
  } ent_t;

  ent_t               tbl [ENTRIES];
  logic [ENTRIES-1:0] v;
  logic [IDX_W-1:0]   head;

  logic [OFS_W-1:0] ofs;
  logic [BLK_W-1:0] blk;
  bmask_t           need;
  logic             is_load;

  assign ofs     = in_addr_i[OFS_W-1:0];
  assign blk     = in_addr_i[ADDR_W-1:OFS_W];
  assign need    = byte_mask(ofs, in_size_i);
  assign is_load = in_valid_i && !in_store_i;

  logic   any_s2l, any_l2l, any_ml;
  macro_t src_word;

  always_comb begin
    any_s2l  = 1'b0;
    any_l2l  = 1'b0;
    any_ml   = 1'b0;
    src_word = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (v[i] && tbl[i].blk == blk) begin
        if (tbl[i].st && covers(tbl[i].mask, need)) begin
          any_s2l  = 1'b1;
          src_word = tbl[i].data;
        end
        if (!tbl[i].st && covers(tbl[i].own, need)) any_l2l = 1'b1;
        if (!tbl[i].st && covers(tbl[i].mask, need)) begin
          any_ml   = 1'b1;
          src_word = tbl[i].data;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      v    <= '0;
    end else if (in_valid_i) begin
      if (in_store_i) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (v[i] && tbl[i].blk == blk && (tbl[i].mask & need) != '0)
            v[i] <= 1'b0;
        end
      end
      v[head] <= 1'b1;
      head    <= (head == IDX_W'(ENTRIES - 1)) ? '0 : head + 1'b1;
    end
  end

  // Entry contents; only read where the valid bit is set.
  always_ff @(posedge clk) begin
    if (in_valid_i) begin
      tbl[head] <= '{st:   in_store_i,
                     blk:  blk,
                     mask: (in_store_i || !macro_en_i) ? need : '1,
                     own:  need,
                     data: in_store_i ? place_lanes(in_value_i, ofs) : in_value_i};
    end
  end

  // Verdict, one cycle later.
  logic             r_valid, r_s2l, r_l2l, r_ml;
  macro_t           r_word;
  logic [OFS_W-1:0] r_ofs;
  mem_size_e        r_size;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_s2l   <= 1'b0;
      r_l2l   <= 1'b0;
      r_ml    <= 1'b0;
      r_word  <= '0;
      r_ofs   <= '0;
      r_size  <= SZ_BYTE;
    end else begin
      r_valid <= is_load;
      r_s2l   <= is_load && any_s2l;
      r_l2l   <= is_load && !any_s2l && any_l2l;
      r_ml    <= is_load && !any_s2l && !any_l2l && any_ml;
      r_word  <= src_word;
      r_ofs   <= ofs;
      r_size  <= in_size_i;
    end
  end

  assign out_valid_o = r_valid;
  assign out_s2l_o   = r_s2l;
  assign out_l2l_o   = r_l2l;
  assign out_ml_o    = r_ml;
  assign out_hit_o   = r_s2l || r_l2l || r_ml;

  data_align u_align (
    .macro_i  (r_word),
    .ofs_i    (r_ofs),
    .size_i   (r_size),
    .signed_i (1'b0),
    .data_o   (out_data_o)
  );

endmodule
