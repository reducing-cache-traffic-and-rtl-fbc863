// mdl_pkg: types and helper functions shared by the macro data load LSQ
// and the memory value reuse table (MVRT).
//
// A "macro data" word is the full width of the data cache port: 64 bits,
// i.e. 8 bytes, on a 64-bit machine. Every access is described by its
// address and its size; within a macro word it covers a set of byte lanes,
// given here as an 8-bit byte mask. Containment of one mask in another is
// the partial-match rule that both the LSQ and the MVRT use.
//
// Taken from the published design: the 64-bit macro word. Own choices: a 32-bit byte
// address, naturally aligned accesses only, and the two-bit size code.
package mdl_pkg;

  localparam int unsigned MACRO_BYTES = 8;                 // cache port width in bytes
  localparam int unsigned MACRO_W     = 8 * MACRO_BYTES;   // 64-bit macro data
  localparam int unsigned OFS_W       = $clog2(MACRO_BYTES);

  // Access size of a memory instruction.
  typedef enum logic [1:0] {
    SZ_BYTE  = 2'd0,
    SZ_HALF  = 2'd1,
    SZ_WORD  = 2'd2,
    SZ_DWORD = 2'd3
  } mem_size_e;

  typedef logic [MACRO_BYTES-1:0] bmask_t;
  typedef logic [MACRO_W-1:0]     macro_t;

  // Where a reused value came from.
  typedef enum logic [1:0] {
    SRC_NONE  = 2'd0,
    SRC_STORE = 2'd1,   // store-to-load forwarding
    SRC_LOAD  = 2'd2    // load-to-load forwarding (from a saved macro word)
  } reuse_src_e;

  // Byte lanes covered by an access of size sz at byte offset ofs.
  function automatic bmask_t byte_mask(input logic [OFS_W-1:0] ofs, input mem_size_e sz);
    bmask_t base;
    case (sz)
      SZ_BYTE:  base = bmask_t'(8'h01);
      SZ_HALF:  base = bmask_t'(8'h03);
      SZ_WORD:  base = bmask_t'(8'h0F);
      default:  base = bmask_t'(8'hFF);
    endcase
    return bmask_t'(base << ofs);
  endfunction

  // True when the access of size sz is naturally aligned at offset ofs.
  function automatic logic is_aligned(input logic [OFS_W-1:0] ofs, input mem_size_e sz);
    case (sz)
      SZ_BYTE:  return 1'b1;
      SZ_HALF:  return ofs[0] == 1'b0;
      SZ_WORD:  return ofs[1:0] == 2'b00;
      default:  return ofs == '0;
    endcase
  endfunction

  // Places the low bytes of a register value on the byte lanes an access
  // at offset ofs occupies (store data placement).
  function automatic macro_t place_lanes(input macro_t val, input logic [OFS_W-1:0] ofs);
    return macro_t'(val << (8 * ofs));
  endfunction

  // True when every lane in need is also in have.
  function automatic logic covers(input bmask_t have, input bmask_t need);
    return (need & ~have) == '0;
  endfunction

endpackage
