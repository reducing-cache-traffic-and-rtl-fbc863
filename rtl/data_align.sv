// data_align: load data alignment logic.
//
// A load always receives a full cache-port wide macro word (64 bits), from
// the data cache or from an LSQ entry. This block picks out the bytes the
// load actually asked for, shifts them down to bit 0 and sign- or
// zero-extends them to 64 bits, ready for a result bus. It is purely
// combinational.
//
// Interface: macro_i is the 64-bit word of the aligned 8-byte block that
// holds the load; ofs_i is the load address' byte offset within that block,
// size_i its size, signed_i selects sign extension. data_o is the result.
//
// The published design places one such alignment unit on the reuse data
// bus and one on the cache load data bus and says the core already has this logic; the
// shift-and-extend structure is this design's own.
module data_align
  import mdl_pkg::*;
(
  input  macro_t                macro_i,
  input  logic [OFS_W-1:0]      ofs_i,
  input  mem_size_e             size_i,
  input  logic                  signed_i,
  output macro_t                data_o
);

  macro_t shifted;

  always_comb begin
    shifted = macro_i >> (8 * ofs_i);
    case (size_i)
      SZ_BYTE:  data_o = {{56{signed_i & shifted[7]}},  shifted[7:0]};
      SZ_HALF:  data_o = {{48{signed_i & shifted[15]}}, shifted[15:0]};
      SZ_WORD:  data_o = {{32{signed_i & shifted[31]}}, shifted[31:0]};
      default:  data_o = shifted;
    endcase
  end

endmodule
