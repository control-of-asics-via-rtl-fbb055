// resp_arbiter: collects acknowledgement and read-data responses from many
// uplink e-links into one stream for a command controller.
//
// Each input has a one-entry holding register; a round-robin pointer
// forwards one held response per clock. Responses are rare (one per
// command), so a single entry per link is enough; a response that arrives
// while its link's entry is still full is dropped and reported on
// overflow. The arbiter is this design's own: the protocol only says that
// acknowledgements and responses are received in hardware.
//
// Interface: in_valid/in (one per link, no back-pressure) -> out_valid/out.
// Timing: a response is forwarded at the earliest one clock after it is
// held, at most N clocks later.
module resp_arbiter
  import sts_pkg::*;
#(
  parameter int N = 40
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid [N],
  input  resp_t in       [N],
  output logic  out_valid,
  output resp_t out,
  output logic  overflow
);
  localparam int PW = (N > 1) ? $clog2(N) : 1;

  logic          held_v [N];
  resp_t         held   [N];
  logic [PW-1:0] ptr, pick;
  logic          found;

  // first held entry at or after the pointer
  always_comb begin
    pick  = ptr;
    found = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      int idx;
      idx = (int'(ptr) + i) % N;
      if (held_v[idx]) begin
        pick  = PW'(idx);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      out_valid <= 1'b0;
      out       <= '0;
      overflow  <= 1'b0;
      for (int i = 0; i < N; i++) begin
        held_v[i] <= 1'b0;
        held[i]   <= '0;
      end
    end else begin
      out_valid <= found;
      out       <= held[pick];
      overflow  <= 1'b0;
      if (found) ptr <= (int'(pick) == N - 1) ? '0 : pick + 1'b1;
      for (int i = 0; i < N; i++) begin
        if (found && pick == PW'(i)) held_v[i] <= 1'b0;
        if (in_valid[i]) begin
          if (held_v[i] && !(found && pick == PW'(i))) overflow <= 1'b1;
          else begin
            held_v[i] <= 1'b1;
            held[i]   <= in[i];
          end
        end
      end
    end
  end
endmodule
