// cmd_controller: issues downlink commands and matches them with the ASICs'
// acknowledgements.
//
// Every command gets the next 4-bit sequence number and is sent as a
// downlink frame. Several commands may be in flight; each is kept in a
// table slot indexed by the low bits of its sequence number. Register-read
// responses carry only the three low sequence bits, so at most
// MAX_IN_FLIGHT = 8 commands are outstanding: a new command stalls
// (cmd_ready low) while the slot of its sequence number is still busy.
// A response closes its slot when chip address, kind (RDdata_ack for a
// read, Ack for any other request) and sequence number (all four bits for
// an Ack, three for read data) match; anything else is counted as
// unexpected. A slot whose response does not come within TIMEOUT_CLKS
// clocks is closed with RES_TIMEOUT. Broadcast commands (chip 15) are
// answered by every chip, so they are not tracked and close with RES_NOACK
// once sent. Only the sequence numbering, the need for an acknowledgement
// and the field widths come from the protocol; the table, the timeout, the
// broadcast rule and the request-to-response mapping are this design's.
//
// Interfaces: cmd (valid/ready) in; tx_frame (valid/ready) to dl_tx;
// resp (valid only, one per clock) from the uplink; done (valid only, one
// per clock). A matching response is reported on done one clock later;
// timeouts and broadcast completions use done when no response does.
module cmd_controller
  import sts_pkg::*;
#(
  parameter int MAX_IN_FLIGHT = 8,
  parameter int TIMEOUT_CLKS  = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  cmd_t        cmd,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [39:0] tx_frame,
  input  logic        resp_valid,
  input  resp_t       resp,
  output logic        done_valid,
  output done_t       done,
  output logic        unexpected,   // pulse: a response matched nothing
  output logic        stall         // a command waits for a free slot
);
  localparam int IW = $clog2(MAX_IN_FLIGHT);
  localparam int TW = $clog2(TIMEOUT_CLKS + 1);

  typedef struct packed {
    logic          busy;
    logic          noack;
    logic [3:0]    seq;
    cmd_t          cmd;
    logic [TW-1:0] age;
  } slot_t;

  slot_t       slots [MAX_IN_FLIGHT];
  logic [3:0]  seq_q;
  logic [IW-1:0] wi, ri, ti;
  logic        slot_free, accept, match, tfound;

  initial begin
    assert (MAX_IN_FLIGHT >= 2 && MAX_IN_FLIGHT <= 8 && (1 << IW) == MAX_IN_FLIGHT)
      else $error("MAX_IN_FLIGHT must be a power of two between 2 and 8");
  end

  dl_frame_builder u_build (
    .seq  (seq_q),
    .cmd  (cmd),
    .frame(tx_frame)
  );

  assign wi        = seq_q[IW-1:0];
  assign slot_free = !slots[wi].busy;
  assign tx_valid  = cmd_valid && slot_free;
  assign cmd_ready = tx_ready && slot_free;
  assign accept    = cmd_valid && cmd_ready;
  assign stall     = cmd_valid && !slot_free;

  // response matching
  always_comb begin
    ri    = resp.seq[IW-1:0];
    match = resp_valid && slots[ri].busy && !slots[ri].noack &&
            slots[ri].cmd.chip == resp.chip &&
            (resp.is_rd ? (slots[ri].cmd.rtype == REQ_RD_DATA &&
                           slots[ri].seq[2:0] == resp.seq[2:0])
                        : (slots[ri].cmd.rtype != REQ_RD_DATA &&
                           slots[ri].seq == resp.seq));
  end

  // lowest slot that is finished without a response
  always_comb begin
    ti     = '0;
    tfound = 1'b0;
    for (int i = MAX_IN_FLIGHT - 1; i >= 0; i--) begin
      if (slots[i].busy && (slots[i].noack || slots[i].age == TW'(TIMEOUT_CLKS))) begin
        ti     = IW'(i);
        tfound = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_q      <= '0;
      done_valid <= 1'b0;
      done       <= '0;
      unexpected <= 1'b0;
      for (int i = 0; i < MAX_IN_FLIGHT; i++) slots[i] <= '0;
    end else begin
      done_valid <= 1'b0;
      unexpected <= resp_valid && !match;
      for (int i = 0; i < MAX_IN_FLIGHT; i++)
        if (slots[i].busy && !slots[i].noack && slots[i].age != TW'(TIMEOUT_CLKS))
          slots[i].age <= slots[i].age + 1'b1;
      if (match) begin
        done_valid      <= 1'b1;
        done.seq        <= slots[ri].seq;
        done.cmd        <= slots[ri].cmd;
        done.result     <= resp.is_rd ? RES_RDDATA : RES_ACK;
        done.ack        <= resp.ack;
        done.cp         <= resp.cp;
        done.status     <= resp.status;
        done.data       <= resp.data;
        slots[ri].busy  <= 1'b0;
      end else if (tfound) begin
        done_valid      <= 1'b1;
        done.seq        <= slots[ti].seq;
        done.cmd        <= slots[ti].cmd;
        done.result     <= slots[ti].noack ? RES_NOACK : RES_TIMEOUT;
        done.ack        <= '0;
        done.cp         <= 1'b0;
        done.status     <= '0;
        done.data       <= '0;
        slots[ti].busy  <= 1'b0;
      end
      if (accept) begin
        seq_q           <= seq_q + 4'd1;
        slots[wi].busy  <= 1'b1;
        slots[wi].noack <= (cmd.chip == CHIP_BROADCAST);
        slots[wi].seq   <= seq_q;
        slots[wi].cmd   <= cmd;
        slots[wi].age   <= '0;
      end
    end
  end

  // a command is only taken into a free slot
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !slots[wi].busy);
endmodule
