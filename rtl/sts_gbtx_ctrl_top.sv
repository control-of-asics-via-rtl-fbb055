// sts_gbtx_ctrl_top: FPGA-side control and readout of the STS-XYTER
// front-end ASICs of one readout board, through its three GBTx chips.
//
// The board has one duplex (master) GBTx and two transmit-only (slave)
// GBTx. The master's downlink carries one 160 Mb/s command e-link per
// front-end board (FEB), shared by the eight ASICs of that FEB; its
// 80-bit GBT-frame user field gives 4 bits per e-link per 40 MHz frame.
// Readout comes back on 320 Mb/s e-links in wide-frame mode (112 user
// bits, 8 bits per e-link per frame): 12 e-links of the master and 14 of
// each slave, 40 in all.
//
// Per FEB: a cmd_controller numbers commands, keeps up to 8 in flight and
// matches acknowledgements; a dl_tx turns frames into 8b/10b symbols or,
// under software control (tx_mode), repeats the SOS, K28.1 or EOS
// synchronisation patterns. Per uplink e-link: a sync_detector reports
// SOS/K28.1/EOS on the raw bits, a ul_aligner finds K28.5 commas and
// decodes symbols, and a ul_frame_decoder cuts and checks 24-bit frames.
// Every decoded frame is brought out for the readout path; Ack and
// RDdata_ack frames with a good CRC also go, through a resp_arbiter, to
// the FEB's controller, tagged with the chip address of their link.
//
// The e-link counts and rates follow the readout-board description; the
// default is the configuration with one FEB of 8 ASICs and 5 e-links per
// ASIC. The positions of the e-links in the GBT frames (e-link n in bits
// 4n+3:4n downlink and 8n+7:8n uplink, link order master, slave 1,
// slave 2) and the link-to-chip mapping (consecutive groups of
// LINKS_PER_ASIC links) are this design's choice. The link-synchronisation
// procedure itself is software's: it sets tx_mode and reads the per-link
// flags. All logic runs on the 40 MHz frame clock.
module sts_gbtx_ctrl_top
  import sts_pkg::*;
#(
  parameter int N_FEB          = 1,
  parameter int ASICS_PER_FEB  = 8,
  parameter int LINKS_PER_ASIC = 5,
  parameter int MAX_IN_FLIGHT  = 8,
  parameter int TIMEOUT_CLKS   = 4096,
  localparam int N_UL          = N_FEB * ASICS_PER_FEB * LINKS_PER_ASIC,
  localparam int LINKS_PER_FEB = ASICS_PER_FEB * LINKS_PER_ASIC
) (
  input  logic           clk,
  input  logic           rst_n,
  // GBT frames
  output logic [79:0]    dl_gbt_data,
  input  logic           ul_gbt_valid,
  input  logic [111:0]   ul_gbt_data [3],
  // command interface, one per FEB
  input  logic           cmd_valid  [N_FEB],
  output logic           cmd_ready  [N_FEB],
  input  cmd_t           cmd        [N_FEB],
  output logic           done_valid [N_FEB],
  output done_t          done       [N_FEB],
  output logic           unexpected [N_FEB],
  output logic           resp_overflow [N_FEB],
  input  tx_mode_t       tx_mode    [N_FEB],
  // link synchronisation status, one per uplink e-link
  input  logic           sync_clear,
  output logic           link_locked [N_UL],
  output logic           sos_ok      [N_UL],
  output logic           sos_seen    [N_UL],
  output logic           other_seen  [N_UL],
  output logic           k281_seen   [N_UL],
  output logic           eos_seen    [N_UL],
  // readout: every decoded uplink frame
  output logic           ul_valid    [N_UL],
  output uframe_t        ul_frame    [N_UL],
  output logic           ul_sync     [N_UL],
  output logic           ul_frame_err[N_UL]
);
  localparam int MASTER_UL = 12;
  localparam int SLAVE_UL  = 14;

  initial begin
    assert (N_FEB <= 20) else $error("at most 20 downlink e-links in an 80-bit frame");
    assert (N_UL <= MASTER_UL + 2 * SLAVE_UL) else $error("at most 40 uplink e-links");
  end

  // ------------------------------------------------------------- downlink
  logic [3:0] dl_elink [N_FEB];

  always_comb begin
    dl_gbt_data = '0;
    for (int f = 0; f < N_FEB; f++) dl_gbt_data[4*f +: 4] = dl_elink[f];
  end

  // ------------------------------------------------------------- uplink
  logic [7:0] ul_elink [N_UL];

  always_comb begin
    for (int l = 0; l < N_UL; l++) begin
      if (l < MASTER_UL)
        ul_elink[l] = ul_gbt_data[0][8*l +: 8];
      else if (l < MASTER_UL + SLAVE_UL)
        ul_elink[l] = ul_gbt_data[1][8*(l - MASTER_UL) +: 8];
      else
        ul_elink[l] = ul_gbt_data[2][8*(l - MASTER_UL - SLAVE_UL) +: 8];
    end
  end

  logic  resp_v [N_UL];
  resp_t resp_d [N_UL];

  for (genvar l = 0; l < N_UL; l++) begin : g_link
    logic       sv, kk, cerr, derr, cm;
    logic [9:0] sy;
    logic [7:0] d;
    logic       unused_det;
    logic       sos_p, k_p, eos_p;

    sync_detector u_sync (
      .clk(clk), .rst_n(rst_n), .din_valid(ul_gbt_valid), .din(ul_elink[l]),
      .clear(sync_clear), .sos_det(sos_p), .k281_det(k_p), .eos_det(eos_p),
      .sos_ok(sos_ok[l]), .sos_seen(sos_seen[l]), .other_seen(other_seen[l]),
      .k281_seen(k281_seen[l]), .eos_seen(eos_seen[l])
    );
    assign unused_det = sos_p ^ k_p ^ eos_p;

    ul_aligner u_align (
      .clk(clk), .rst_n(rst_n), .din_valid(ul_gbt_valid), .din(ul_elink[l]),
      .sym_valid(sv), .sym(sy), .data(d), .k(kk), .code_err(cerr), .disp_err(derr),
      .comma(cm), .locked(link_locked[l])
    );

    ul_frame_decoder u_frame (
      .clk(clk), .rst_n(rst_n), .sym_valid(sv), .data(d), .k(kk),
      .sym_err(cerr | derr), .frame_valid(ul_valid[l]), .frame(ul_frame[l]),
      .sync_frame(ul_sync[l]), .frame_err(ul_frame_err[l])
    );

    // acknowledgements and read data go to the controller
    always_comb begin
      resp_v[l] = ul_valid[l] && ul_frame[l].crc_ok &&
                  (ul_frame[l].kind == UF_ACK || ul_frame[l].kind == UF_RDDATA);
      resp_d[l]        = '0;
      resp_d[l].chip   = 4'((l % LINKS_PER_FEB) / LINKS_PER_ASIC);
      resp_d[l].is_rd  = (ul_frame[l].kind == UF_RDDATA);
      resp_d[l].seq    = ul_frame[l].seq;
      resp_d[l].ack    = ul_frame[l].ack;
      resp_d[l].cp     = ul_frame[l].cp;
      resp_d[l].status = ul_frame[l].status;
      resp_d[l].data   = ul_frame[l].rd_data;
    end
  end

  // ------------------------------------------------------------- per FEB
  for (genvar f = 0; f < N_FEB; f++) begin : g_feb
    logic        tx_v, tx_r, wl, rv, stall;
    logic [39:0] tx_f;
    resp_t       r;
    logic        in_v [LINKS_PER_FEB];
    resp_t       in_d [LINKS_PER_FEB];

    for (genvar i = 0; i < LINKS_PER_FEB; i++) begin : g_in
      assign in_v[i] = resp_v[f * LINKS_PER_FEB + i];
      assign in_d[i] = resp_d[f * LINKS_PER_FEB + i];
    end

    resp_arbiter #(.N(LINKS_PER_FEB)) u_arb (
      .clk(clk), .rst_n(rst_n), .in_valid(in_v), .in(in_d),
      .out_valid(rv), .out(r), .overflow(resp_overflow[f])
    );

    cmd_controller #(.MAX_IN_FLIGHT(MAX_IN_FLIGHT), .TIMEOUT_CLKS(TIMEOUT_CLKS)) u_ctrl (
      .clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid[f]), .cmd_ready(cmd_ready[f]),
      .cmd(cmd[f]), .tx_valid(tx_v), .tx_ready(tx_r), .tx_frame(tx_f),
      .resp_valid(rv), .resp(r), .done_valid(done_valid[f]), .done(done[f]),
      .unexpected(unexpected[f]), .stall(stall)
    );

    dl_tx #(.BITS_PER_CLK(4)) u_tx (
      .clk(clk), .rst_n(rst_n), .mode(tx_mode[f]), .frame_valid(tx_v),
      .frame_ready(tx_r), .frame(tx_f), .dout(dl_elink[f]), .word_load(wl)
    );
  end
endmodule
