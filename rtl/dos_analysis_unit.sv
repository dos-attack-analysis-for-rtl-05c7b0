// dos_analysis_unit: DoS attack analysis for a host-side intrusion
// prevention system.
//
// A DoS attack floods a host with traffic in a short time, so the unit
// judges traffic per time window: it adds up the data lengths of all
// packets in a window and reports an attack when the sum passes a set
// value, together with the sender address that sent the most bytes.
// Packet descriptors {sender IP, data length} arrive from the host-side
// processor, one 48-bit word per clock at most.
//
// Two blocks, as in the design's structure diagram:
//   stored_unit     buffers descriptors (RAM1) and keeps the per-sender
//                   byte sums of the window (RAM2); every RAM2 write is
//                   passed on as the 48-bit R_RAM2 word.
//   detecting_unit  sums the window's bytes, times the window, raises
//                   detect and tracks the largest per-sender sum.
// The detecting unit's clear (end of a window without attack) also
// empties the stored unit's table; that link is this design's choice.
// The detecting unit sees every descriptor presented on we, also one that
// RAM1 has no room for, so the window's byte sum counts the whole flood
// even when the table cannot keep up; only the per-sender sums, and so
// the largest-sender report, miss the dropped descriptors.
//
// Outputs to the protection logic, with the diagram's widths: detect (1),
// max_ip (32), max_dl (16), data_sum (16). Reset is active low and
// synchronous.
module dos_analysis_unit
  import hhips_pkg::*;
#(
  parameter int unsigned RAM1_DEPTH = 16,
  parameter int unsigned RAM2_DEPTH = 16,
  parameter int unsigned DIV_A      = 5,
  parameter int unsigned DIV_B      = 10,
  parameter int unsigned TIME_W     = 16
) (
  input  logic              clk,
  input  logic              reset_n,
  // packet descriptors from the host-side processor
  input  logic              we,
  input  ip_t               ip_addr,
  input  len_t              data_len,
  // set values
  input  len_t              thr_data,
  input  logic [TIME_W-1:0] thr_time,
  // to the protection logic
  output logic              detect,
  output ip_t               max_ip,
  output len_t              max_dl,
  output len_t              data_sum,
  // status
  output logic              clear,
  output logic              t_time,
  output logic              table_we,   // a RAM2 entry is written
  output logic              n_p,        // table search steps to next entry
  output logic [$clog2(RAM2_DEPTH+1)-1:0] n_entries,
  output logic              ram1_full,
  output logic              ram1_drop,
  output logic              ram2_drop,
  output logic              busy
);

  logic   w_e_2;
  entry_t r_ram2;

  assign table_we = w_e_2;

  stored_unit #(
    .RAM1_DEPTH (RAM1_DEPTH),
    .RAM2_DEPTH (RAM2_DEPTH)
  ) u_stored (
    .clk       (clk),
    .reset_n   (reset_n),
    .we        (we),
    .ip_addr   (ip_addr),
    .data_len  (data_len),
    .clear     (clear),
    .w_e_2     (w_e_2),
    .w_a_2     (),
    .w_d_2     (r_ram2),
    .n_p       (n_p),
    .ram1_full (ram1_full),
    .ram1_drop (ram1_drop),
    .ram2_drop (ram2_drop),
    .busy      (busy),
    .n_entries (n_entries)
  );

  detecting_unit #(
    .DIV_A  (DIV_A),
    .DIV_B  (DIV_B),
    .TIME_W (TIME_W)
  ) u_detect (
    .clk      (clk),
    .reset_n  (reset_n),
    .we       (we),
    .data_len (data_len),
    .w_e_2    (w_e_2),
    .w_d_2    (r_ram2),
    .thr_data (thr_data),
    .thr_time (thr_time),
    .detect   (detect),
    .max_ip   (max_ip),
    .max_dl   (max_dl),
    .data_sum (data_sum),
    .clear    (clear),
    .t_time   (t_time),
    .div_5    (),
    .div_10   ()
  );

endmodule
