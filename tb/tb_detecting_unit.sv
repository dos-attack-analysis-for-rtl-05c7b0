// tb_detecting_unit: self-checking test of the window sum, the DoS
// decision and the largest-sender report.
//
// Two scenarios mirror the design's detecting-unit trace: three 200-byte
// packets (senders 10.0.0.1, 10.0.0.2, 10.0.0.1) with table writes
// 10.0.0.1/200, 10.0.0.2/200, 10.0.0.1/400, against a byte threshold of
// 700 (no attack: 600 <= 700, the window ends with clear) and of 500
// (attack: 600 > 500, detect, max 10.0.0.1 / 400). Also checked: the
// window period of DIV_A*DIV_B*(thr_time+1)+1 clocks, the one-cycle
// detect latency, zeroing at clear, a packet counted into the new window
// on the clear cycle, and saturation of data_sum.
module tb_detecting_unit;
  import hhips_pkg::*;

  localparam int DA = 5, DB = 10;

  logic clk = 1'b0, reset_n = 1'b0;
  logic we = 1'b0, w_e_2 = 1'b0;
  len_t data_len = '0;
  entry_t w_d_2 = '0;
  len_t thr_data = 16'd700;
  logic [15:0] thr_time = 16'd1;
  logic detect, clear, t_time, div_5, div_10;
  ip_t  max_ip;
  len_t max_dl, data_sum;

  detecting_unit #(.DIV_A(DA), .DIV_B(DB), .TIME_W(16)) dut (.*);

  always #8 clk = ~clk;

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

  int clears = 0, detects = 0;
  int clear_cycles [$];
  always @(posedge clk) if (reset_n) begin
    if (clear) begin clears++; clear_cycles.push_back(cycle); end
  end

  localparam ip_t IP1 = 32'h0A000001, IP2 = 32'h0A000002;

  task automatic do_reset();
    @(negedge clk); reset_n = 1'b0;
    @(negedge clk); @(negedge clk); reset_n = 1'b1;
  endtask

  task automatic pkt(len_t len);
    we = 1'b1; data_len = len; @(negedge clk); we = 1'b0;
  endtask

  task automatic twr(ip_t ip, len_t len);
    w_e_2 = 1'b1; w_d_2 = '{ip: ip, len: len}; @(negedge clk); w_e_2 = 1'b0;
  endtask

  // the three-packet sequence of the trace; table writes trail the packets
  task automatic trace_sequence(bit expect_attack);
    pkt(200); check(data_sum == 16'h00C8, "sum 200");
    pkt(200); check(data_sum == 16'h0190, "sum 400");
    pkt(200); check(data_sum == 16'h0258, "sum 600");
    check(!detect, "detect not before the edge after the sum");
    @(negedge clk);
    check(detect == expect_attack, $sformatf("detect=%0b after sum 600", detect));
    twr(IP1, 200);
    check(max_ip == IP1 && max_dl == 200, "max 10.0.0.1 / 200");
    twr(IP2, 200);
    check(max_ip == IP1 && max_dl == 200, "equal length keeps first sender");
    twr(IP1, 400);
    check(max_ip == IP1 && max_dl == 400, "max 10.0.0.1 / 400");
  endtask

  initial begin
    int c0;
    // ---------------- no attack: threshold 700 ----------------
    thr_data = 700; thr_time = 1;
    do_reset();
    c0 = cycle;
    trace_sequence(1'b0);
    wait (clears == 1);
    @(negedge clk);
    check(!detect, "no detect with 600 <= 700");
    check(data_sum == 0 && max_dl == 0 && max_ip == 0, "window cleared");
    // reset released at the edge counted as c0; first cycle of the window c0
    check(clear_cycles[0] - c0 == DA*DB*(int'(thr_time)+1),
          $sformatf("first window ends after %0d cycles", clear_cycles[0] - c0));
    wait (clears == 2);
    check(clear_cycles[1] - clear_cycles[0] == DA*DB*(int'(thr_time)+1) + 1,
          $sformatf("window period %0d", clear_cycles[1] - clear_cycles[0]));

    // a packet on the clear cycle starts the new window's sum
    thr_time = 0;
    wait (clears == 3);
    do @(negedge clk); while (!t_time);
    we = 1'b1; data_len = 77;
    check(clear, "clear with t_time");
    @(negedge clk); we = 1'b0;
    check(data_sum == 77, $sformatf("packet on clear cycle counted in new window (sum %0d, clears %0d)", data_sum, clears));

    // ---------------- attack: threshold 500 ----------------
    thr_data = 500; thr_time = 1;
    do_reset();
    clears = 0;
    trace_sequence(1'b1);
    repeat (3*DA*DB*2) @(negedge clk);
    check(detect, "detect stays high");
    check(clears == 0, "no window clear after detect");
    check(data_sum == 16'h0258, "sum held at detection");
    check(max_ip == IP1 && max_dl == 16'd400, "report 10.0.0.1 / 400");

    // ---------------- saturation ----------------
    thr_data = 16'hFFFF; thr_time = 16'hFFFE;
    do_reset();
    repeat (3) pkt(16'h7000);
    check(data_sum == 16'hFFFF, "data_sum saturates");
    @(negedge clk);
    check(!detect, "saturated sum is not above an all-ones threshold");

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
