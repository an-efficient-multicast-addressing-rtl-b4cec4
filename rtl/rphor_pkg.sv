// rphor_pkg: types shared by the RPHOR multicast copy network.
//
// Every link in the network is bit-serial. A link carries a valid flag, which
// stays high for the whole length of a cell, and one data bit per clock. A cell
// is its routing header (a destination bitmap, bit P0 first) followed by the
// ATM cell body. Cells of back-to-back slots may follow without a gap: a
// receiver finds cell boundaries by counting bits from the first valid clock.
package rphor_pkg;

  // One bit-serial link.
  typedef struct packed {
    logic vld;  // a cell occupies the link in this clock
    logic dat;  // current bit of the cell (0 when vld is low)
  } link_t;

  // Bits in the body of an ATM cell (53 bytes).
  parameter int unsigned ATM_CELL_BITS = 424;

endpackage
