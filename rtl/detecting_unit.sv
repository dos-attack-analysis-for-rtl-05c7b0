// detecting_unit: per-window traffic sum and DoS decision.
//
// The unit measures traffic in fixed time windows. Within a window it adds
// the data length of every accepted packet into data_sum, and it watches
// every word the stored unit writes into its per-sender table to remember
// the sender with the largest summed length (max_ip, max_dl). Each cycle
// it makes the decision of the design's flow chart, in that order:
//
//   data_sum > thr_data        -> detect goes high and stays high until
//                                 reset; window timing stops
//   else timer > thr_time      -> window over: clear pulses for one cycle,
//                                 timer and data_sum restart from zero
//   else                       -> keep counting
//
// The timer runs off a two-stage prescaler: div_5 pulses once every
// DIV_A clocks and div_10 once every DIV_B pulses of div_5; the timer
// counts div_10 pulses, so thr_time is in units of DIV_A*DIV_B clocks
// (50 clocks, one microsecond at 50 MHz). The stage names come from the
// design's detecting-unit trace; the ratios 5 and 10 are read from those
// names. t_time is high while the timer is past thr_time.
//
// max_ip / max_dl change only when a table write carries a strictly
// larger length, so of two senders with equal sums the first one stays.
// They keep updating after detect, since table writes trail the sum, and
// are zeroed with the window at clear, as the table is. data_sum and
// max_dl saturate. Timing: a packet accepted at clock edge k is in
// data_sum after edge k, and detect rises at edge k+1 if the sum is over
// the threshold. Reset is active low and synchronous. Zeroing the maximum
// per window and the sticky detect are this design's choices.
module detecting_unit
  import hhips_pkg::*;
#(
  parameter int unsigned DIV_A  = 5,   // first prescaler stage (div_5)
  parameter int unsigned DIV_B  = 10,  // second prescaler stage (div_10)
  parameter int unsigned TIME_W = 16   // timer / thr_time width
) (
  input  logic              clk,
  input  logic              reset_n,
  // accepted packets (the stored unit's input)
  input  logic              we,
  input  len_t              data_len,
  // table writes from the stored unit (R_RAM2)
  input  logic              w_e_2,
  input  entry_t            w_d_2,
  // set values
  input  len_t              thr_data,   // bytes per window
  input  logic [TIME_W-1:0] thr_time,   // window length, div_10 periods
  // results, to the protection logic
  output logic              detect,
  output ip_t               max_ip,
  output len_t              max_dl,
  output len_t              data_sum,
  // window timing
  output logic              clear,
  output logic              t_time,
  output logic              div_5,
  output logic              div_10
);

  logic [$clog2(DIV_A)-1:0] cnt_a;
  logic [$clog2(DIV_B)-1:0] cnt_b;
  logic [TIME_W-1:0]        timer;
  logic                     over;

  assign div_5  = (cnt_a == ($bits(cnt_a))'(DIV_A - 1));
  assign div_10 = div_5 && (cnt_b == ($bits(cnt_b))'(DIV_B - 1));

  assign over   = (data_sum > thr_data);
  assign t_time = (timer > thr_time);
  assign clear  = t_time && !over && !detect;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      cnt_a    <= '0;
      cnt_b    <= '0;
      timer    <= '0;
      data_sum <= '0;
      detect   <= 1'b0;
      max_ip   <= '0;
      max_dl   <= '0;
    end else if (detect || over) begin
      // Attack found: hold the sum and the timer, keep tracking the maximum.
      detect <= 1'b1;
      if (w_e_2 && (w_d_2.len > max_dl)) begin
        max_ip <= w_d_2.ip;
        max_dl <= w_d_2.len;
      end
    end else if (clear) begin
      // Window over without attack: start a new window.
      cnt_a    <= '0;
      cnt_b    <= '0;
      timer    <= '0;
      data_sum <= we ? data_len : '0;
      if (w_e_2) begin
        max_ip <= w_d_2.ip;
        max_dl <= w_d_2.len;
      end else begin
        max_ip <= '0;
        max_dl <= '0;
      end
    end else begin
      cnt_a <= div_5 ? '0 : cnt_a + 1'b1;
      if (div_5) cnt_b <= div_10 ? '0 : cnt_b + 1'b1;
      if (div_10 && timer != '1) timer <= timer + 1'b1;
      if (we) data_sum <= sat_add(data_sum, data_len);
      if (w_e_2 && (w_d_2.len > max_dl)) begin
        max_ip <= w_d_2.ip;
        max_dl <= w_d_2.len;
      end
    end
  end

endmodule
