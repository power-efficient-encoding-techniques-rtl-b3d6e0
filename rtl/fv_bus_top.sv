// fv_bus_top: three frequent-value encoded off-chip data buses side by side.
//
// Each link is one half-duplex k-bit data bus with one encode line between a
// processor-side codec and a memory-side codec of the same scheme. Whichever
// end sends encodes (processor writes, memory read data); the other end
// decodes. The codecs are symmetric: both ends keep identical tables because
// both see every word. Link 0 uses FV-i (default m = 2, a 120-word table),
// link 1 FV-i-MSB-j (default FV-2-MSB-2 with 19 MSBs), link 2 FV-MSB-LSB
// (default 20 MSBs, 12 LSBs). The three are independent; each has its own
// ports, indexed 0..2 in that order.
//
// The wires of a link carry the value of the end that drives them (the
// drive flags are registered transmit requests); when neither drives, both
// ends hold the same last bus value, which is shown on bus_dq. rx_kind tells how a received word was coded. bus_strobe
// marks a cycle that carries a new word; bus_kind tells what kind of code
// that word is. A word given on cpu_tx_* or mem_tx_* appears on the bus the
// next cycle and at the other end's rx outputs the cycle after (two cycles).
// Both ends of one link must not send in the same cycle, and an end must not
// send in the cycle a word from the other end is on the bus (one idle cycle
// when the direction turns). rx_error flags an encoded word that did not
// decode; it stays low in correct operation.
module fv_bus_top
  import fvbus_pkg::*;
#(
  parameter int unsigned K        = BUS_WIDTH,
  parameter int unsigned FVI_M    = 2,
  parameter int unsigned FVIJ_I   = 2,
  parameter int unsigned FVIJ_J   = 2,
  parameter int unsigned FVIJ_R   = MSB_BITS_FV2_MSB2,
  parameter int unsigned MSBLSB_R = MSB_BITS_FV_MSB_LSB
) (
  input  logic                clk,
  input  logic                rst_n,
  // processor side
  input  logic [2:0]          cpu_tx_valid,
  input  logic [2:0][K-1:0]   cpu_tx_data,
  output logic [2:0]          cpu_rx_valid,
  output logic [2:0][K-1:0]   cpu_rx_data,
  output logic [2:0]          cpu_rx_error,
  output code_kind_e [2:0]    cpu_rx_kind,
  // memory side
  input  logic [2:0]          mem_tx_valid,
  input  logic [2:0][K-1:0]   mem_tx_data,
  output logic [2:0]          mem_rx_valid,
  output logic [2:0][K-1:0]   mem_rx_data,
  output logic [2:0]          mem_rx_error,
  output code_kind_e [2:0]    mem_rx_kind,
  // the off-chip wires
  output logic [2:0][K-1:0]   bus_dq,
  output logic [2:0]          bus_enc,
  output logic [2:0]          bus_strobe,
  output code_kind_e [2:0]    bus_kind
);

  logic [2:0][K-1:0] cpu_dq,   mem_dq;
  logic [2:0]        cpu_enc,  mem_enc;
  logic [2:0]        cpu_drv,  mem_drv;
  code_kind_e [2:0]  cpu_kind, mem_kind;

  for (genvar l = 0; l < 3; l++) begin : g_wires
    assign bus_dq[l]     = cpu_drv[l] ? cpu_dq[l]   : mem_dq[l];
    assign bus_enc[l]    = cpu_drv[l] ? cpu_enc[l]  : mem_enc[l];
    assign bus_kind[l]   = cpu_drv[l] ? cpu_kind[l] : mem_kind[l];
    assign bus_strobe[l] = cpu_drv[l] || mem_drv[l];

    a_one_sender: assert property (@(posedge clk) disable iff (!rst_n)
      !(cpu_tx_valid[l] && mem_tx_valid[l]));
  end

  // Link 0: FV-i.
  fv_i_codec #(.K(K), .M(FVI_M)) u_fvi_cpu (
    .clk, .rst_n,
    .tx_valid (cpu_tx_valid[0]), .tx_data (cpu_tx_data[0]), .tx_kind (cpu_kind[0]),
    .rx_valid (cpu_rx_valid[0]), .rx_data (cpu_rx_data[0]), .rx_kind (cpu_rx_kind[0]),
    .rx_error (cpu_rx_error[0]),
    .bus_dq_o (cpu_dq[0]), .bus_enc_o (cpu_enc[0]), .bus_drive_o (cpu_drv[0]),
    .bus_dq_i (bus_dq[0]), .bus_enc_i (bus_enc[0]), .bus_strobe_i (mem_drv[0])
  );
  fv_i_codec #(.K(K), .M(FVI_M)) u_fvi_mem (
    .clk, .rst_n,
    .tx_valid (mem_tx_valid[0]), .tx_data (mem_tx_data[0]), .tx_kind (mem_kind[0]),
    .rx_valid (mem_rx_valid[0]), .rx_data (mem_rx_data[0]), .rx_kind (mem_rx_kind[0]),
    .rx_error (mem_rx_error[0]),
    .bus_dq_o (mem_dq[0]), .bus_enc_o (mem_enc[0]), .bus_drive_o (mem_drv[0]),
    .bus_dq_i (bus_dq[0]), .bus_enc_i (bus_enc[0]), .bus_strobe_i (cpu_drv[0])
  );

  // Link 1: FV-i-MSB-j.
  fv_i_msb_j_codec #(.K(K), .I(FVIJ_I), .J(FVIJ_J), .R(FVIJ_R)) u_fvij_cpu (
    .clk, .rst_n,
    .tx_valid (cpu_tx_valid[1]), .tx_data (cpu_tx_data[1]), .tx_kind (cpu_kind[1]),
    .rx_valid (cpu_rx_valid[1]), .rx_data (cpu_rx_data[1]), .rx_kind (cpu_rx_kind[1]),
    .rx_error (cpu_rx_error[1]),
    .bus_dq_o (cpu_dq[1]), .bus_enc_o (cpu_enc[1]), .bus_drive_o (cpu_drv[1]),
    .bus_dq_i (bus_dq[1]), .bus_enc_i (bus_enc[1]), .bus_strobe_i (mem_drv[1])
  );
  fv_i_msb_j_codec #(.K(K), .I(FVIJ_I), .J(FVIJ_J), .R(FVIJ_R)) u_fvij_mem (
    .clk, .rst_n,
    .tx_valid (mem_tx_valid[1]), .tx_data (mem_tx_data[1]), .tx_kind (mem_kind[1]),
    .rx_valid (mem_rx_valid[1]), .rx_data (mem_rx_data[1]), .rx_kind (mem_rx_kind[1]),
    .rx_error (mem_rx_error[1]),
    .bus_dq_o (mem_dq[1]), .bus_enc_o (mem_enc[1]), .bus_drive_o (mem_drv[1]),
    .bus_dq_i (bus_dq[1]), .bus_enc_i (bus_enc[1]), .bus_strobe_i (cpu_drv[1])
  );

  // Link 2: FV-MSB-LSB.
  fv_msb_lsb_codec #(.K(K), .R(MSBLSB_R)) u_fvml_cpu (
    .clk, .rst_n,
    .tx_valid (cpu_tx_valid[2]), .tx_data (cpu_tx_data[2]), .tx_kind (cpu_kind[2]),
    .rx_valid (cpu_rx_valid[2]), .rx_data (cpu_rx_data[2]), .rx_kind (cpu_rx_kind[2]),
    .rx_error (cpu_rx_error[2]),
    .bus_dq_o (cpu_dq[2]), .bus_enc_o (cpu_enc[2]), .bus_drive_o (cpu_drv[2]),
    .bus_dq_i (bus_dq[2]), .bus_enc_i (bus_enc[2]), .bus_strobe_i (mem_drv[2])
  );
  fv_msb_lsb_codec #(.K(K), .R(MSBLSB_R)) u_fvml_mem (
    .clk, .rst_n,
    .tx_valid (mem_tx_valid[2]), .tx_data (mem_tx_data[2]), .tx_kind (mem_kind[2]),
    .rx_valid (mem_rx_valid[2]), .rx_data (mem_rx_data[2]), .rx_kind (mem_rx_kind[2]),
    .rx_error (mem_rx_error[2]),
    .bus_dq_o (mem_dq[2]), .bus_enc_o (mem_enc[2]), .bus_drive_o (mem_drv[2]),
    .bus_dq_i (bus_dq[2]), .bus_enc_i (bus_enc[2]), .bus_strobe_i (cpu_drv[2])
  );

endmodule
