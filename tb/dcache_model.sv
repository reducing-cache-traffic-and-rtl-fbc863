// dcache_model: behavioural model of the dual-ported L1 data cache, as
// seen by the LSQ. Not synthesizable design: a perfect cache (every access
// hits) with a fixed read latency.
//
// Port 0 reads the whole 8-byte word of a block address and returns it
// exactly LAT cycles after the request. Port 1 writes the byte lanes in
// wr_be at the clock edge. A read and a write in the same cycle see the
// memory as it was before the write. Memory starts as init_word(block).
module dcache_model
  import mdl_pkg::*;
#(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LAT    = 2
) (
  input  logic              clk,
  input  logic              rd_valid,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_rvalid,
  output macro_t            rd_data,
  input  logic              wr_valid,
  input  logic [ADDR_W-1:0] wr_addr,
  input  macro_t            wr_data,
  input  bmask_t            wr_be
);
  import tb_util_pkg::*;

  macro_t mem [logic [31:0]];
  logic   vq [LAT];
  macro_t dq [LAT];
  int     reads  = 0;
  int     writes = 0;

  function automatic macro_t peek(input logic [31:0] blk);
    return mem.exists(blk) ? mem[blk] : init_word(blk);
  endfunction

  initial for (int i = 0; i < LAT; i++) begin vq[i] = 1'b0; dq[i] = '0; end

  always @(posedge clk) begin
    macro_t w;
    vq[0] <= rd_valid;
    dq[0] <= peek(32'(rd_addr >> 3));
    for (int i = 1; i < LAT; i++) begin vq[i] <= vq[i-1]; dq[i] <= dq[i-1]; end
    if (rd_valid) reads++;
    if (wr_valid) begin
      writes++;
      w = peek(32'(wr_addr >> 3));
      for (int b = 0; b < 8; b++) if (wr_be[b]) w[8*b +: 8] = wr_data[8*b +: 8];
      mem[32'(wr_addr >> 3)] = w;
    end
  end

  assign rd_rvalid = vq[LAT-1];
  assign rd_data   = dq[LAT-1];
endmodule
