// fvbus_pkg: constants and types shared by the frequent-value bus codecs.
//
// The codecs sit at both ends of a k-bit off-chip data bus (k = 32). Each
// transfer is classified by the kind of code placed on the bus; the kind is
// reported by every codec for statistics and by the testbenches for coverage.
// BUS_WIDTH and the MSB widths are the evaluated configuration: a 32-bit bus,
// 20 MSBs for FV-MSB-LSB and FV-1-MSB-2, 19 MSBs for FV-2-MSB-2.
package fvbus_pkg;

  // Width k of the off-chip data bus.
  parameter int unsigned BUS_WIDTH = 32;

  // Number of most-significant bits held by the MSB table of each scheme.
  parameter int unsigned MSB_BITS_FV_MSB_LSB = 20;
  parameter int unsigned MSB_BITS_FV1_MSB2   = 20;
  parameter int unsigned MSB_BITS_FV2_MSB2   = 19;

  // What a transfer put on the bus.
  typedef enum logic [2:0] {
    CK_RAW     = 3'd0,  // value sent as-is, encode line low
    CK_FV      = 3'd1,  // whole value found in the FV table
    CK_MSB     = 3'd2,  // MSB portion one-hot, LSB portion as-is
    CK_LSB     = 3'd3,  // LSB portion one-hot, MSB portion as-is
    CK_MSB_LSB = 3'd4   // both portions one-hot
  } code_kind_e;

  // Position of the lowest set bit of v (0 when v has no set bit). Callers
  // zero-extend narrower fields; the codecs only call it on fields that hold
  // exactly one set bit.
  function automatic int unsigned first_one(logic [63:0] v);
    int unsigned pos;
    pos = 0;
    for (int i = 63; i >= 0; i--) begin
      if (v[i]) pos = int'(i);
    end
    return pos;
  endfunction

endpackage
