// noc_prototypes_top: the three network-on-chip prototypes built from one
// router and one network interface, side by side.
//
//   mj_* : star network of the Motion JPEG encoder (mjpeg_noc), 5 cores.
//   mp_* : two-router network of the MPEG-2 encoder (mpeg2_noc), 7 cores with
//          one motion estimator (MPEG2_NUM_ME = 1) or 8 with two.
//   ms_* : ROWS x COLS mesh with long-range links (mesh_noc), 16 cores.
// The three share the clock and reset and nothing else. Each core port set
// is that of noc_ni (packetizing transmit side, depacketizing receive side),
// indexed by node number; the cores themselves (DCT, quantization, VLE,
// motion estimation and compensation, memories, traffic generators) attach
// there. Each network also brings out a routing-table write port.
// The set of prototypes and their shared router follow the source design;
// putting them into one top with shared clock is only a packaging choice.
module noc_prototypes_top
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W       = 16,
  parameter int unsigned DEPTH        = 16,
  parameter int unsigned MPEG2_NUM_ME = 1,
  parameter int unsigned ROWS         = 4,
  parameter int unsigned COLS         = 4,
  parameter int unsigned NUM_LRL      = 2,
  parameter int          LRL_A [4]    = '{5, 9, 0, 0},
  parameter int          LRL_B [4]    = '{15, 3, 0, 0},
  localparam int unsigned MP_NN       = 6 + MPEG2_NUM_ME,
  localparam int unsigned MS_NN       = ROWS * COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  // mj cores
  input  logic              mj_tx_valid [5],
  input  logic [FLIT_W-1:0] mj_tx_data  [5],
  input  addr_t             mj_tx_dest  [5],
  input  len_t              mj_tx_len   [5],
  output logic              mj_tx_ready [5],
  output logic              mj_rx_valid [5],
  output logic [FLIT_W-1:0] mj_rx_data  [5],
  output logic              mj_rx_first [5],
  output logic              mj_rx_last  [5],
  input  logic              mj_rx_ready [5],
  input  logic              mj_cfg_we,
  input  addr_t             mj_cfg_dest,
  input  port_t             mj_cfg_port,
  // mp cores
  input  logic              mp_tx_valid [MP_NN],
  input  logic [FLIT_W-1:0] mp_tx_data  [MP_NN],
  input  addr_t             mp_tx_dest  [MP_NN],
  input  len_t              mp_tx_len   [MP_NN],
  output logic              mp_tx_ready [MP_NN],
  output logic              mp_rx_valid [MP_NN],
  output logic [FLIT_W-1:0] mp_rx_data  [MP_NN],
  output logic              mp_rx_first [MP_NN],
  output logic              mp_rx_last  [MP_NN],
  input  logic              mp_rx_ready [MP_NN],
  input  logic              mp_cfg_we,
  input  logic             mp_cfg_router,
  input  addr_t             mp_cfg_dest,
  input  port_t             mp_cfg_port,
  // ms cores
  input  logic              ms_tx_valid [MS_NN],
  input  logic [FLIT_W-1:0] ms_tx_data  [MS_NN],
  input  addr_t             ms_tx_dest  [MS_NN],
  input  len_t              ms_tx_len   [MS_NN],
  output logic              ms_tx_ready [MS_NN],
  output logic              ms_rx_valid [MS_NN],
  output logic [FLIT_W-1:0] ms_rx_data  [MS_NN],
  output logic              ms_rx_first [MS_NN],
  output logic              ms_rx_last  [MS_NN],
  input  logic              ms_rx_ready [MS_NN],
  input  logic              ms_cfg_we,
  input  addr_t            ms_cfg_node,
  input  addr_t             ms_cfg_dest,
  input  port_t             ms_cfg_port
);

  mjpeg_noc #(.FLIT_W(FLIT_W), .DEPTH(DEPTH)) u_mjpeg (
    .clk        (clk),
    .rst_n      (rst_n),
    .tx_valid   (mj_tx_valid),
    .tx_data    (mj_tx_data),
    .tx_dest    (mj_tx_dest),
    .tx_len     (mj_tx_len),
    .tx_ready   (mj_tx_ready),
    .rx_valid   (mj_rx_valid),
    .rx_data    (mj_rx_data),
    .rx_first   (mj_rx_first),
    .rx_last    (mj_rx_last),
    .rx_ready   (mj_rx_ready),
    .cfg_we     (mj_cfg_we),
    .cfg_dest   (mj_cfg_dest),
    .cfg_port   (mj_cfg_port)
  );

  mpeg2_noc #(.FLIT_W(FLIT_W), .DEPTH(DEPTH), .NUM_ME(MPEG2_NUM_ME)) u_mpeg2 (
    .clk        (clk),
    .rst_n      (rst_n),
    .tx_valid   (mp_tx_valid),
    .tx_data    (mp_tx_data),
    .tx_dest    (mp_tx_dest),
    .tx_len     (mp_tx_len),
    .tx_ready   (mp_tx_ready),
    .rx_valid   (mp_rx_valid),
    .rx_data    (mp_rx_data),
    .rx_first   (mp_rx_first),
    .rx_last    (mp_rx_last),
    .rx_ready   (mp_rx_ready),
    .cfg_we     (mp_cfg_we),
    .cfg_router (mp_cfg_router),
    .cfg_dest   (mp_cfg_dest),
    .cfg_port   (mp_cfg_port)
  );

  mesh_noc #(
    .ROWS(ROWS), .COLS(COLS), .FLIT_W(FLIT_W), .DEPTH(DEPTH),
    .NUM_LRL(NUM_LRL), .LRL_A(LRL_A), .LRL_B(LRL_B)
  ) u_mesh (
    .clk        (clk),
    .rst_n      (rst_n),
    .tx_valid   (ms_tx_valid),
    .tx_data    (ms_tx_data),
    .tx_dest    (ms_tx_dest),
    .tx_len     (ms_tx_len),
    .tx_ready   (ms_tx_ready),
    .rx_valid   (ms_rx_valid),
    .rx_data    (ms_rx_data),
    .rx_first   (ms_rx_first),
    .rx_last    (ms_rx_last),
    .rx_ready   (ms_rx_ready),
    .cfg_we     (ms_cfg_we),
    .cfg_node   (ms_cfg_node),
    .cfg_dest   (ms_cfg_dest),
    .cfg_port   (ms_cfg_port)
  );

endmodule
