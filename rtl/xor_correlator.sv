// xor_correlator: correlator and decorrelator of one end of the data bus.
//
// A code word is sent as a change of the bus, not as a level: the value on
// the wires becomes the previous value XOR the code, so a one-hot code costs
// exactly one wire transition. The receiving end recovers the code as the
// new bus value XOR the previous one. One XOR per bus wire, as the document
// describes; both directions share the register that holds the last value
// seen on the bus, since every codec sees every transfer.
//
// Interface and timing:
//   tx_en, tx_code : this end sends tx_code; at the clock edge bus_q becomes
//                    bus_q ^ tx_code, so the wires change one cycle later
//   rx_en, bus_in  : the far end has put a new value on the bus; at the
//                    clock edge bus_q takes it
//   rx_code        : combinational, bus_in ^ bus_q
//   bus_q          : the value this end drives (and the last value seen)
// tx_en and rx_en are never high together on a half-duplex bus; if they are,
// tx_en wins. The bus is reset to all zeros (this design's choice).
module xor_correlator #(
  parameter int unsigned K = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_en,
  input  logic [K-1:0] tx_code,
  input  logic         rx_en,
  input  logic [K-1:0] bus_in,
  output logic [K-1:0] rx_code,
  output logic [K-1:0] bus_q
);

  assign rx_code = bus_in ^ bus_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     bus_q <= '0;
    else if (tx_en) bus_q <= bus_q ^ tx_code;
    else if (rx_en) bus_q <= bus_in;
  end

endmodule
