// hhips_idl: the intrusion detection logic of a hardware host-side
// intrusion prevention system, as far as it is built here.
//
// The logic sits between a network interface and its host. Two
// independent parts stand side by side, each with its own ports:
//   dos_analysis_unit  judges the traffic of each time window against a
//                      byte threshold and names the sender that sent the
//                      most (see that module).
//   port_monitor       passes packets only to user-specified TCP/UDP
//                      ports.
// Packet descriptors for the DoS unit come from the host-side processor;
// detect, max_ip, max_dl and data_sum go to the protection logic, which
// acts on them. The radio front end, the Ethernet controller with its CRC
// and WEP logic, and the protector itself are outside this module; their
// signals are the ports here. All parameters take the defaults of the two
// parts. Reset is active low and synchronous.
module hhips_idl
  import hhips_pkg::*;
#(
  parameter int unsigned RAM1_DEPTH = 16,
  parameter int unsigned RAM2_DEPTH = 16,
  parameter int unsigned DIV_A      = 5,
  parameter int unsigned DIV_B      = 10,
  parameter int unsigned TIME_W     = 16,
  parameter int unsigned N_PORTS    = 8
) (
  input  logic                       clk,
  input  logic                       reset_n,
  // DoS analysis: descriptors from the host-side processor
  input  logic                       dos_we,
  input  ip_t                        dos_ip_addr,
  input  len_t                       dos_data_len,
  input  len_t                       dos_thr_data,
  input  logic [TIME_W-1:0]          dos_thr_time,
  // DoS analysis: to the protection logic
  output logic                       dos_detect,
  output ip_t                        dos_max_ip,
  output len_t                       dos_max_dl,
  output len_t                       dos_data_sum,
  output logic                       dos_clear,
  output logic                       dos_t_time,
  output logic                       dos_table_we,
  output logic                       dos_n_p,
  output logic [$clog2(RAM2_DEPTH+1)-1:0] dos_n_entries,
  output logic                       dos_ram1_full,
  output logic                       dos_ram1_drop,
  output logic                       dos_ram2_drop,
  output logic                       dos_busy,
  // port monitor
  input  logic                       pm_cfg_we,
  input  logic [$clog2(N_PORTS)-1:0] pm_cfg_idx,
  input  logic [15:0]                pm_cfg_port,
  input  logic                       pm_cfg_en,
  input  logic                       pm_pkt_valid,
  input  logic [15:0]                pm_pkt_port,
  output logic                       pm_out_valid,
  output logic                       pm_out_pass,
  output logic [15:0]                pm_out_port
);

  dos_analysis_unit #(
    .RAM1_DEPTH (RAM1_DEPTH),
    .RAM2_DEPTH (RAM2_DEPTH),
    .DIV_A      (DIV_A),
    .DIV_B      (DIV_B),
    .TIME_W     (TIME_W)
  ) u_dos (
    .clk       (clk),
    .reset_n   (reset_n),
    .we        (dos_we),
    .ip_addr   (dos_ip_addr),
    .data_len  (dos_data_len),
    .thr_data  (dos_thr_data),
    .thr_time  (dos_thr_time),
    .detect    (dos_detect),
    .max_ip    (dos_max_ip),
    .max_dl    (dos_max_dl),
    .data_sum  (dos_data_sum),
    .clear     (dos_clear),
    .t_time    (dos_t_time),
    .table_we  (dos_table_we),
    .n_p       (dos_n_p),
    .n_entries (dos_n_entries),
    .ram1_full (dos_ram1_full),
    .ram1_drop (dos_ram1_drop),
    .ram2_drop (dos_ram2_drop),
    .busy      (dos_busy)
  );

  port_monitor #(
    .N_PORTS (N_PORTS)
  ) u_ports (
    .clk       (clk),
    .reset_n   (reset_n),
    .cfg_we    (pm_cfg_we),
    .cfg_idx   (pm_cfg_idx),
    .cfg_port  (pm_cfg_port),
    .cfg_en    (pm_cfg_en),
    .pkt_valid (pm_pkt_valid),
    .pkt_port  (pm_pkt_port),
    .out_valid (pm_out_valid),
    .out_pass  (pm_out_pass),
    .out_port  (pm_out_port)
  );

endmodule
