// tb_dos_analysis_unit: end-to-end test of the DoS analysis unit.
//
// Part 1 replays the design's traces: packets 10.0.0.1/200, 10.0.0.2/200,
// 10.0.0.1/200 back to back. With a byte threshold of 700 the window ends
// without attack (sum 600, largest sender 10.0.0.1 with 400 bytes) and
// clear empties sum, table and report. With a threshold of 500 detect
// rises two clocks after the third packet and the report settles on
// 10.0.0.1 / 400.
// Part 2 runs several windows of random traffic from a pool of senders.
// A reference model in the testbench adds up each sender's bytes in
// packet order and keeps the first sender to reach the largest sum; after
// each window's traffic it must match data_sum, max_ip and max_dl. The
// last window crosses the threshold and must raise detect.
module tb_dos_analysis_unit;
  import hhips_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  logic we = 1'b0;
  ip_t  ip_addr = '0;
  len_t data_len = '0;
  len_t thr_data = 16'd700;
  logic [15:0] thr_time = 16'd1;
  logic detect, clear, t_time, table_we, n_p, ram1_full, ram1_drop, ram2_drop, busy;
  ip_t  max_ip;
  len_t max_dl, data_sum;
  logic [4:0] n_entries;

  dos_analysis_unit dut (.*);

  always #8 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0, clears = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (reset_n && clear) clears++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  localparam ip_t IP1 = 32'h0A000001, IP2 = 32'h0A000002;

  task automatic do_reset();
    @(negedge clk); reset_n = 1'b0;
    repeat (2) @(negedge clk); reset_n = 1'b1;
  endtask

  task automatic wait_idle();
    int n = 0;
    do begin @(negedge clk); n++; end while (busy && n < 1000);
  endtask

  task automatic send(ip_t ip, len_t len);
    we = 1'b1; ip_addr = ip; data_len = len;
    @(negedge clk);
    we = 1'b0;
  endtask

  // reference model of one window
  int  m_sum;
  int  m_by_ip [ip_t];
  ip_t m_max_ip;
  int  m_max;

  function automatic void m_clear();
    m_sum = 0; m_by_ip.delete(); m_max_ip = '0; m_max = 0;
  endfunction

  function automatic void m_pkt(ip_t ip, int len);
    m_sum += len;
    if (!m_by_ip.exists(ip)) m_by_ip[ip] = 0;
    m_by_ip[ip] += len;
    if (m_by_ip[ip] > m_max) begin m_max = m_by_ip[ip]; m_max_ip = ip; end
  endfunction

  initial begin
    int c3, w;
    ip_t pool [6];
    // ---------------- part 1: the trace, no attack ----------------
    thr_data = 700; thr_time = 4;
    do_reset();
    send(IP1, 200); send(IP2, 200); send(IP1, 200);
    wait_idle();
    check(data_sum == 600, "sum 600");
    check(!detect, "600 <= 700: no attack");
    check(max_ip == IP1 && max_dl == 400, "largest sender 10.0.0.1 / 400");
    check(n_entries == 2, "two senders in the table");
    wait (clears == 1);
    @(negedge clk);
    check(data_sum == 0 && max_dl == 0 && n_entries == 0, "clear empties the window");

    // ---------------- part 1: the trace, attack ----------------
    thr_data = 500;
    do_reset();
    send(IP1, 200); send(IP2, 200);
    we = 1'b1; ip_addr = IP1; data_len = 200;
    @(posedge clk); c3 = cycle;
    @(negedge clk); we = 1'b0;
    while (!detect && cycle < c3 + 10) @(negedge clk);
    check(detect && cycle - c3 == 2, $sformatf("detect %0d cycles after the third packet", cycle - c3));
    wait_idle();
    check(max_ip == IP1 && max_dl == 400, "report 10.0.0.1 / 400");
    check(data_sum == 600, "sum 600 held");

    // ---------------- part 2: random windows ----------------
    for (int i = 0; i < 6; i++) pool[i] = {8'd192, 8'd168, 8'd1, 8'(10 + i)};
    thr_data = 16'hF000; thr_time = 20;        // 1050-cycle windows
    do_reset();
    clears = 0;
    for (w = 0; w < 6; w++) begin
      int n;
      m_clear();
      if (w == 5) thr_data = 16'd1500;        // last window is an attack
      n = $urandom_range(8, 30);
      for (int k = 0; k < n; k++) begin
        ip_t ip; int len;
        ip  = pool[$urandom_range(0, 5)];
        len = $urandom_range(40, 120);
        if (w == 5) len = 200;
        send(ip, len_t'(len));
        m_pkt(ip, len);
        wait_idle();
      end
      check(clears == w, $sformatf("window %0d traffic inside the window", w));
      if (w < 5) begin
        check(int'(data_sum) == m_sum, $sformatf("window %0d sum %0d expected %0d", w, data_sum, m_sum));
        check(int'(max_dl) == m_max && max_ip == m_max_ip,
              $sformatf("window %0d max %h/%0d expected %h/%0d", w, max_ip, max_dl, m_max_ip, m_max));
        check(!detect, "no attack below threshold");
        wait (clears == w + 1);
        @(negedge clk);
      end else begin
        check(detect, "attack window detected");
        check(int'(max_dl) == m_max && max_ip == m_max_ip, "attack report matches model");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
