// tb_stored_unit: self-checking test of the descriptor buffer and the
// per-sender table.
//
// A reference model in the testbench (an associative array from IP to
// {table index, summed length}) predicts, for every accepted descriptor,
// which table address is written with which word, or that a new sender
// finds the table full. A monitor compares every RAM2 write and every
// ram2_drop pulse with the prediction, in order. Covered: the three-packet
// sequence 10.0.0.1/200, 10.0.0.2/200, 10.0.0.1/200 (entry 0 ends at 400),
// the latency of 2 + (entries compared) cycles per descriptor, a back-to-
// back burst that fills RAM1, a full table, length saturation, and
// clearing the table both idle and with a descriptor in flight.
module tb_stored_unit;
  import hhips_pkg::*;

  localparam int D1 = 16, D2 = 16;

  logic clk = 1'b0, reset_n = 1'b0;
  logic we = 1'b0, clear = 1'b0;
  ip_t  ip_addr = '0;
  len_t data_len = '0;
  logic w_e_2, n_p, ram1_full, ram1_drop, ram2_drop, busy;
  logic [$clog2(D2)-1:0] w_a_2;
  entry_t w_d_2;
  logic [$clog2(D2+1)-1:0] n_entries;

  stored_unit #(.RAM1_DEPTH(D1), .RAM2_DEPTH(D2)) dut (.*);

  always #8 clk = ~clk;   // 16 ns period

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- reference model ----------------
  typedef struct { int idx; int sum; } slot_t;
  slot_t model [ip_t];
  int    model_n = 0;
  typedef struct { bit drop; int addr; entry_t word; } exp_t;
  exp_t  expq [$];

  function automatic int sat(int v);
    return (v > 65535) ? 65535 : v;
  endfunction

  function automatic void model_accept(ip_t ip, len_t len);
    exp_t e;
    e.drop = 0;
    if (model.exists(ip)) begin
      model[ip].sum = sat(model[ip].sum + int'(len));
      e.addr = model[ip].idx;
      e.word = '{ip: ip, len: len_t'(model[ip].sum)};
    end else if (model_n < D2) begin
      model[ip] = '{idx: model_n, sum: int'(len)};
      e.addr = model_n;
      e.word = '{ip: ip, len: len};
      model_n++;
    end else begin
      e.drop = 1;
    end
    expq.push_back(e);
  endfunction

  function automatic void model_clear();
    model.delete();
    model_n = 0;
  endfunction

  // entries compared before a write, for an idle unit: newest first
  function automatic int compares(ip_t ip);
    if (model_n == 0) return 0;
    if (model.exists(ip)) return model_n - model[ip].idx;
    return model_n;
  endfunction

  // ---------------- monitor ----------------
  int writes = 0, drops2 = 0, nps = 0, drops1 = 0;
  int last_write_cycle = 0;
  entry_t seen [D2];           // last word seen written per table address
  always @(posedge clk) if (reset_n) begin
    if (n_p) nps++;
    if (ram1_drop) drops1++;
    if (w_e_2 || ram2_drop) begin
      exp_t e;
      check(expq.size() > 0, "table event with nothing expected");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        if (ram2_drop) begin
          drops2++;
          check(e.drop && !w_e_2, "ram2_drop not predicted");
        end else begin
          writes++;
          seen[w_a_2] = w_d_2;
          last_write_cycle = cycle;
          check(!e.drop, "write where a full-table drop was predicted");
          check(int'(w_a_2) == e.addr, $sformatf("w_a_2=%0d expected %0d", w_a_2, e.addr));
          check(w_d_2 == e.word, $sformatf("w_d_2=%h expected %h", w_d_2, e.word));
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic send(ip_t ip, len_t len);
    @(negedge clk);
    we = 1'b1; ip_addr = ip; data_len = len;
    if (!ram1_full) model_accept(ip, len);
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while (busy && n < 1000) begin @(negedge clk); n++; end
    @(negedge clk);
  endtask

  // send to an idle unit and check the write happens 2 + compares cycles later
  task automatic send_timed(ip_t ip, len_t len);
    int exp_lat, start;
    exp_lat = 2 + compares(ip);
    @(negedge clk);
    we = 1'b1; ip_addr = ip; data_len = len;
    model_accept(ip, len);
    start = cycle;             // the next posedge samples we
    @(negedge clk);
    we = 1'b0;
    wait_idle();
    check(expq.size() == 0, "timed descriptor not written");
    check(last_write_cycle - start == exp_lat,
          $sformatf("latency %0d expected %0d", last_write_cycle - start, exp_lat));
  endtask

  function automatic ip_t ipv4(int a, int b, int c, int d);
    return {8'(a), 8'(b), 8'(c), 8'(d)};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    reset_n = 1'b1;

    // Three descriptors back to back, as in the stored-unit trace.
    send(ipv4(10,0,0,1), 200);
    send(ipv4(10,0,0,2), 200);
    send(ipv4(10,0,0,1), 200);
    wait_idle();
    check(writes == 3 && expq.size() == 0, "three-packet sequence: three writes");
    check(seen[0] == 48'h0A000001_0190, "entry 0 holds 10.0.0.1 / 400");
    check(seen[1] == 48'h0A000002_00C8, "entry 1 holds 10.0.0.2 / 200");
    check(n_entries == 2, "two senders");
    check(nps >= 1, "search stepped to an older entry");

    // Latency per descriptor, idle unit.
    send_timed(ipv4(10,0,0,2), 100);   // newest entry: 1 compare
    send_timed(ipv4(10,0,0,1), 100);   // 2 compares
    send_timed(ipv4(10,0,0,3), 50);    // new: 2 compares then append
    send_timed(ipv4(10,0,0,1), 16'hFFF0); // saturates

    // Idle clear empties the table.
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    model_clear();
    check(n_entries == 0, "clear empties the table");
    send_timed(ipv4(10,0,0,1), 7);     // empty table: written at once
    check(seen[0] == {ipv4(10,0,0,1), 16'd7}, "fresh entry after clear");

    // Burst of 24 back-to-back descriptors from 20 senders: RAM1 fills,
    // the table fills, later new senders are dropped.
    for (int i = 0; i < 24; i++) begin
      @(negedge clk);
      we = 1'b1; ip_addr = ipv4(192,168,0,i % 20); data_len = len_t'(i + 1);
      if (!ram1_full) model_accept(ip_addr, data_len);
    end
    @(negedge clk); we = 1'b0;
    wait_idle();
    check(drops1 > 0, "RAM1 overflow seen in burst");
    // keep feeding until the table overflows
    for (int i = 0; i < 20; i++) begin
      send(ipv4(172,16,0,i), 1);
      wait_idle();
    end
    check(int'(n_entries) == D2, "table full");
    check(drops2 > 0, "full-table drop seen");
    check(expq.size() == 0, "all predicted events seen");

    // Clear while a descriptor is being searched: it enters the new table.
    model_clear();
    @(negedge clk);
    we = 1'b1; ip_addr = ipv4(8,8,8,8); data_len = 300;
    @(negedge clk); we = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(busy, "descriptor still in flight at clear");
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    model_accept(ipv4(8,8,8,8), 300);
    wait_idle();
    check(n_entries == 1, "in-flight descriptor entered into empty table");
    check(seen[0] == {ipv4(8,8,8,8), 16'd300}, "in-flight entry content");
    check(expq.size() == 0, "all predicted events seen after clear");

    $display("writes=%0d ram2_drops=%0d ram1_drops=%0d n_p=%0d", writes, drops2, drops1, nps);
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
