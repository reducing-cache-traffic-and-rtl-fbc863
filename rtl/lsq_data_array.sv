// lsq_data_array: data storage of the load store queue.
//
// One 64-bit macro word per LSQ entry. In a conventional LSQ only store
// entries use their data field; here a load entry keeps the whole
// cache-port word its load brought in, so that later loads can reuse it.
//
// Two write ports and one read port:
//   wa_*  allocation write: the lane-placed data of a store (store data
//         path) or, for a load served from the LSQ, a copy of the reused
//         word;
//   wb_*  LSQ update path: the macro word seen at the cache port when a
//         load's cache access returns;
//   rd_*  combinational read of the entry a load hit (reuse data path).
// Writes take effect at the clock edge. When both write ports name the
// same entry the update port wins (the LSQ never does this).
//
// Taken from the published design: a data field per entry, filled from
// the store data path and from the cache port. Own choices: the port
// count and the combinational read.
module lsq_data_array
  import mdl_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             wa_en_i,
  input  logic [IDX_W-1:0] wa_idx_i,
  input  macro_t           wa_data_i,
  input  logic             wb_en_i,
  input  logic [IDX_W-1:0] wb_idx_i,
  input  macro_t           wb_data_i,
  input  logic [IDX_W-1:0] rd_idx_i,
  output macro_t           rd_data_o
);

  macro_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wa_en_i) mem[wa_idx_i] <= wa_data_i;
    if (wb_en_i) mem[wb_idx_i] <= wb_data_i;
  end

  assign rd_data_o = mem[rd_idx_i];

endmodule
