// Private-bank address mapping.
//
// Each requestor owns one DRAM bank, so the rows it opens cannot be closed by
// anyone else. A physical address is laid out, from the top, as
//   bank | row | column burst | byte offset in the 64-byte line
// so that every bank is one contiguous region of memory and software places a
// requestor's data in its own region. The decoder splits the address and
// reports whether the bank field names the bank assigned to requestor `rid`
// (requestor i owns bank i mod NUM_BANKS). One request moves one burst of
// BL = 8 beats, so the low three column bits are always zero.
//
// Purely combinational. Private banks come from the design; the field order
// and the rid-to-bank rule are this implementation's choice.
// bank, row and col are plain slices of addr (wires, no gates); only
// private_ok is computed.
// The byte-offset bits addr[5:0] are not used: a request always moves the
// whole 64-byte line.
module addr_map
  import mc_pkg::*;
#(
  parameter int unsigned NUM_REQ = 8
) (
  input  addr_t                        addr,
  input  logic [$clog2(NUM_REQ)-1:0]   rid,
  output bank_t                        bank,
  output row_t                         row,
  output col_t                         col,
  output logic                         private_ok
);

  localparam int unsigned COL_LO = LINE_BYTES_LOG2;
  localparam int unsigned ROW_LO = COL_LO + COL_BITS - 3;
  localparam int unsigned BANK_LO = ROW_LO + ROW_BITS;

  bank_t own_bank;

  always_comb begin
    bank = addr[BANK_LO +: BANK_BITS];
    row  = addr[ROW_LO +: ROW_BITS];
    col  = {addr[COL_LO +: COL_BITS-3], 3'b000};
    own_bank   = bank_t'(32'(rid) % NUM_BANKS);
    private_ok = (bank == own_bank);
  end

endmodule
