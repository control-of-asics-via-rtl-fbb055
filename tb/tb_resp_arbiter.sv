// tb_resp_arbiter: random sparse responses on 6 inputs; every response
// must come out exactly once, a burst on all inputs at once must be
// drained in round-robin order, and a second response on an input whose
// entry is still full must be reported as overflow and dropped.
module tb_resp_arbiter;
  import sts_pkg::*;
  int checks = 0, failures = 0;
  localparam int N = 6;

  logic  clk = 0, rst_n = 0;
  logic  in_valid [N];
  resp_t in [N];
  logic  out_valid, overflow;
  resp_t out;

  resp_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in(in),
                             .out_valid(out_valid), .out(out), .overflow(overflow));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int    outstanding [bit [13:0]];
  int    n_out = 0, n_in = 0, n_ovf = 0;
  int    order[$];
  bit    burst = 0, random_on = 0;
  int    ovf_phase = 0;
  int    id = 0;
  int    cyc = 0;
  int    last [N];
  initial foreach (last[i]) last[i] = -100;

  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < N; i++) in_valid[i] <= 0;
    if (rst_n && out_valid) begin
      n_out++;
      chk(outstanding.exists(out.data), "output was sent");
      if (outstanding.exists(out.data)) outstanding.delete(out.data);
      order.push_back(int'(out.chip));
    end
    if (rst_n && overflow) n_ovf++;
    if (random_on)
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 29) == 0 && cyc - last[i] > N + 2) begin
          last[i] = cyc;
          in_valid[i] <= 1;
          in[i]       <= '{chip: 4'(i), is_rd: 1'b0, seq: 4'd0, ack: 2'd0, cp: 1'b0,
                           status: 4'd0, data: 14'(id)};
          outstanding[14'(id)] = 1;
          id++;
          n_in++;
        end
    if (burst) begin
      burst = 0;
      for (int i = 0; i < N; i++) begin
        in_valid[i] <= 1;
        in[i]       <= '{chip: 4'(i), is_rd: 1'b0, seq: 4'd0, ack: 2'd0, cp: 1'b0,
                         status: 4'd0, data: 14'(id)};
        outstanding[14'(id)] = 1;
        id++;
        n_in++;
      end
    end
    if (ovf_phase == 1 || ovf_phase == 2) begin
      // responses on inputs 0..2, then at once another on input 2, whose
      // entry is still waiting behind 0 and 1
      for (int i = (ovf_phase == 1 ? 0 : 2); i < 3; i++) begin
        in_valid[i] <= 1;
        in[i]       <= '{chip: 4'(i), is_rd: 1'b0, seq: 4'd0, ack: 2'd0, cp: 1'b0,
                         status: 4'd0, data: 14'(id)};
        if (ovf_phase == 1 || i != 2) outstanding[14'(id)] = 1;
        id++;
      end
      ovf_phase++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    random_on = 1;
    repeat (2000) @(posedge clk);
    random_on = 0;
    repeat (20) @(posedge clk);
    chk(n_out == n_in && outstanding.size() == 0, "every random response delivered once");
    order.delete();
    burst = 1;
    repeat (20) @(posedge clk);
    chk(order.size() == N, "burst drained");
    for (int i = 1; i < order.size(); i++)
      chk(order[i] == (order[i-1] + 1) % N, "round-robin order");
    ovf_phase = 1;
    repeat (20) @(posedge clk);
    chk(n_ovf >= 1, "overflow reported");
    chk(outstanding.size() == 0, "all held responses delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
