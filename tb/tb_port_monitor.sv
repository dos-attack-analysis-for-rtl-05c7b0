// tb_port_monitor: self-checking test of the active-port filter.
//
// The testbench keeps its own list of active ports and, for a stream of
// packets (listed ports, unlisted ports and random ones), expects
// out_pass one cycle after each packet exactly when the port is listed.
// It checks that all ports are blocked after reset, that disabling a slot
// closes its port, and that rewriting a slot moves the open port.
module tb_port_monitor;
  localparam int N = 8;

  logic clk = 1'b0, reset_n = 1'b0;
  logic cfg_we = 1'b0, cfg_en = 1'b0;
  logic [$clog2(N)-1:0] cfg_idx = '0;
  logic [15:0] cfg_port = '0;
  logic pkt_valid = 1'b0;
  logic [15:0] pkt_port = '0;
  logic out_valid, out_pass;
  logic [15:0] out_port;

  port_monitor #(.N_PORTS(N)) dut (.*);

  always #8 clk = ~clk;

  int checks = 0, failures = 0, passes = 0, blocks = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] m_port [N];
  bit          m_en   [N];

  function automatic bit listed(logic [15:0] p);
    for (int i = 0; i < N; i++) if (m_en[i] && m_port[i] == p) return 1;
    return 0;
  endfunction

  task automatic cfg(int idx, logic [15:0] port, bit en);
    @(negedge clk);
    cfg_we = 1'b1; cfg_idx = idx[$clog2(N)-1:0]; cfg_port = port; cfg_en = en;
    m_port[idx] = port; m_en[idx] = en;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // present one packet; the verdict must be there after the next edge
  task automatic probe(logic [15:0] port);
    bit exp;
    exp = listed(port);
    @(negedge clk);
    pkt_valid = 1'b1; pkt_port = port;
    @(negedge clk);
    pkt_valid = 1'b0;
    check(out_valid && out_port == port, "verdict one cycle after the packet");
    check(out_pass == exp, $sformatf("port %0d pass=%0b expected %0b", port, out_pass, exp));
    if (out_pass) passes++; else blocks++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin m_port[i] = '0; m_en[i] = 0; end
    repeat (2) @(negedge clk);
    reset_n = 1'b1;

    probe(16'd80);                       // nothing listed: blocked
    probe(16'd0);
    cfg(0, 16'd25, 1);                   // mail
    cfg(1, 16'd53, 1);                   // DNS
    cfg(2, 16'd80, 1);                   // web
    probe(16'd25); probe(16'd53); probe(16'd80);
    probe(16'd22); probe(16'd8080); probe(16'd0);
    cfg(1, 16'd53, 0);                   // close DNS
    probe(16'd53);
    cfg(2, 16'd443, 1);                  // move web to 443
    probe(16'd80); probe(16'd443);
    for (int i = 3; i < N; i++) cfg(i, 16'(1000 + i), 1);
    for (int k = 0; k < 200; k++) begin
      if (k % 3 == 0) probe(16'(1000 + 3 + (k % (N - 3))));
      else            probe(16'($urandom_range(0, 2047)));
    end
    // idle cycles give no verdict
    @(negedge clk);
    check(!out_valid, "no verdict without a packet");
    check(passes > 0 && blocks > 0, "both verdicts seen");

    $display("passes=%0d blocks=%0d", passes, blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
