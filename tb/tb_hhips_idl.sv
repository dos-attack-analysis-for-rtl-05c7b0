// tb_hhips_idl: end-to-end test of the intrusion detection logic with all
// parameters at their defaults (16-word RAM1, 16-entry table, 5 x 10
// prescaler, 8 port slots).
//
// DoS analysis: the first window sends 20 senders one packet each (the
// table takes 16, four find it full), repeats some (their sums grow after
// a search through older entries), then a 24-word back-to-back burst
// (the first 16 words are taken at one word per clock, later ones overflow
// RAM1). A model in the testbench, fed only with the accepted descriptors
// (we and not ram1_full) for the per-sender sums and with every presented
// descriptor for the byte sum, predicts the window's sum and the largest
// sender; the window then ends with clear. The second window is a flood
// from one sender that must raise detect and name it.
// Port monitor: mail, DNS and web ports are opened; a packet stream is
// checked against the list.
// Each mechanism (append, accumulate, search step, RAM1 overflow, table
// full, window clear, detect, report update, pass, block) is counted, and
// one that never happens is a failure.
module tb_hhips_idl;
  import hhips_pkg::*;

  logic clk = 1'b0, reset_n = 1'b0;
  logic dos_we = 1'b0;
  ip_t  dos_ip_addr = '0;
  len_t dos_data_len = '0;
  len_t dos_thr_data = 16'hFFFF;
  logic [15:0] dos_thr_time = 16'd40;
  logic dos_detect, dos_clear, dos_t_time, dos_table_we, dos_n_p;
  logic dos_ram1_full, dos_ram1_drop, dos_ram2_drop, dos_busy;
  ip_t  dos_max_ip;
  len_t dos_max_dl, dos_data_sum;
  logic [4:0] dos_n_entries;
  logic pm_cfg_we = 1'b0, pm_cfg_en = 1'b0;
  logic [2:0] pm_cfg_idx = '0;
  logic [15:0] pm_cfg_port = '0;
  logic pm_pkt_valid = 1'b0;
  logic [15:0] pm_pkt_port = '0;
  logic pm_out_valid, pm_out_pass;
  logic [15:0] pm_out_port;

  hhips_idl dut (.*);

  always #8 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_write = 0, n_append = 0, n_accum = 0, n_step = 0, n_ram1_drop = 0, n_ram2_drop = 0;
  int n_clear = 0, n_detect = 0, n_report = 0, n_pass = 0, n_block = 0;
  logic [4:0] prev_entries = '0;
  len_t prev_max = '0;
  logic prev_detect = 1'b0;

  // model fed with accepted descriptors
  int  m_sum = 0;
  int  m_by_ip [ip_t];
  ip_t m_max_ip = '0;
  int  m_max = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (reset_n) begin
      if (dos_table_we) n_write++;
      if (dos_n_entries > prev_entries) n_append++;
      if (dos_n_p) n_step++;
      if (dos_ram1_drop) n_ram1_drop++;
      if (dos_ram2_drop) n_ram2_drop++;
      if (dos_clear) n_clear++;
      if (dos_detect && !prev_detect) n_detect++;
      if (dos_max_dl != prev_max && dos_max_dl != 0) n_report++;
      if (pm_out_valid && pm_out_pass) n_pass++;
      if (pm_out_valid && !pm_out_pass) n_block++;
      prev_detect <= dos_detect;
      prev_max    <= dos_max_dl;
      if (dos_we && !dos_clear) m_sum += int'(dos_data_len);
      if (dos_we && !dos_ram1_full) begin
        if (!m_by_ip.exists(dos_ip_addr)) m_by_ip[dos_ip_addr] = 0;
        m_by_ip[dos_ip_addr] += int'(dos_data_len);
      end
    end
    prev_entries <= dos_n_entries;
  end

  // The largest sender counts only senders that got a table entry: the
  // model replays table admission in arrival order (first 16 senders).
  ip_t admitted [$];
  function automatic void m_admit(ip_t ip);
    foreach (admitted[i]) if (admitted[i] == ip) return;
    if (admitted.size() < 16) admitted.push_back(ip);
  endfunction

  task automatic send(ip_t ip, len_t len);
    dos_we = 1'b1; dos_ip_addr = ip; dos_data_len = len;
    if (!dos_ram1_full) m_admit(ip);
    @(negedge clk);
    dos_we = 1'b0;
  endtask

  task automatic wait_idle();
    int n = 0;
    do begin @(negedge clk); n++; end while (dos_busy && n < 2000);
  endtask

  function automatic ip_t sender(int i);
    return {8'd10, 8'd0, 8'd1, 8'(i)};
  endfunction

  // ---------------- port monitor stream ----------------
  task automatic pm_cfg(int idx, logic [15:0] port);
    @(negedge clk);
    pm_cfg_we = 1'b1; pm_cfg_idx = 3'(idx); pm_cfg_port = port; pm_cfg_en = 1'b1;
    @(negedge clk);
    pm_cfg_we = 1'b0;
  endtask

  initial begin : port_stream
    logic [15:0] p;
    bit exp;
    wait (reset_n);
    pm_cfg(0, 16'd25); pm_cfg(1, 16'd53); pm_cfg(2, 16'd80);
    for (int k = 0; k < 300; k++) begin
      case (k % 4)
        0: p = 16'd25;
        1: p = 16'd80;
        default: p = 16'($urandom_range(0, 1023));
      endcase
      exp = (p == 25 || p == 53 || p == 80);
      @(negedge clk);
      pm_pkt_valid = 1'b1; pm_pkt_port = p;
      @(negedge clk);
      pm_pkt_valid = 1'b0;
      check(pm_out_valid && pm_out_pass == exp, $sformatf("port %0d verdict", p));
    end
  end

  initial begin
    int burst_taken, win_end, m_best;
    ip_t m_best_ip;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;

    // ---------------- window 1: mixed traffic ----------------
    for (int i = 0; i < 20; i++) begin send(sender(i), len_t'(60 + i)); wait_idle(); end
    check(dos_n_entries == 16, "table holds 16 senders");
    for (int i = 0; i < 6; i++) begin send(sender(2*i), 16'd300); wait_idle(); end
    // back-to-back burst: one word per clock
    burst_taken = 0;
    for (int i = 0; i < 24; i++) begin
      if (!dos_ram1_full) burst_taken++;
      send(sender(i % 4), 16'd10);
    end
    check(burst_taken >= 16, $sformatf("burst: %0d words taken at one per clock", burst_taken));
    wait_idle();
    check(!dos_clear && n_clear == 0, "window 1 traffic inside the window");
    check(int'(dos_data_sum) == m_sum, $sformatf("window sum %0d expected %0d", dos_data_sum, m_sum));
    m_best = 0; m_best_ip = '0;
    foreach (admitted[i])
      if (m_by_ip[admitted[i]] > m_best) begin m_best = m_by_ip[admitted[i]]; m_best_ip = admitted[i]; end
    check(int'(dos_max_dl) == m_best && dos_max_ip == m_best_ip,
          $sformatf("largest sender %h/%0d expected %h/%0d", dos_max_ip, dos_max_dl, m_best_ip, m_best));
    check(!dos_detect, "no attack in window 1");
    win_end = cycle;
    wait (n_clear == 1);
    @(negedge clk);
    check(dos_data_sum == 0 && dos_n_entries == 0, "window 1 cleared");

    // ---------------- window 2: flood from one sender ----------------
    dos_thr_data = 16'd3000;
    for (int i = 0; i < 200 && !dos_detect; i++) begin
      send(32'hC0A80063, 16'd100);
      if (i % 3 == 2) send(sender(1), 16'd40);
    end
    wait_idle();
    check(dos_detect, "flood detected");
    check(dos_max_ip == 32'hC0A80063, "flood sender named");
    check(dos_data_sum > 16'd3000, "window sum above the set value");

    wait (n_block + n_pass >= 300);
    n_accum = n_write - n_append;
    $display("append=%0d accum=%0d step=%0d ram1_drop=%0d ram2_drop=%0d clear=%0d detect=%0d report=%0d pass=%0d block=%0d",
             n_append, n_accum, n_step, n_ram1_drop, n_ram2_drop, n_clear, n_detect, n_report, n_pass, n_block);
    check(n_append > 0, "mechanism: new sender appended");
    check(n_accum > 0, "mechanism: known sender accumulated");
    check(n_step > 0, "mechanism: search step");
    check(n_ram1_drop > 0, "mechanism: RAM1 overflow");
    check(n_ram2_drop > 0, "mechanism: table full");
    check(n_clear > 0, "mechanism: window clear");
    check(n_detect == 1, "mechanism: DoS detect");
    check(n_report > 0, "mechanism: report update");
    check(n_pass > 0, "mechanism: port pass");
    check(n_block > 0, "mechanism: port block");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
