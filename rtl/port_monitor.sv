// port_monitor: port filter of the intrusion detection logic.
//
// Network applications (mail, web, DNS, ...) are reached through TCP and
// UDP port numbers. The monitor keeps a list of user-specified ports that
// are active; a packet whose port is on the list passes, every other
// packet is blocked, so unused ports stay closed without any work by the
// host CPU.
//
// The list has N_PORTS slots, each a 16-bit port number with an enable
// bit, written one slot at a time through the cfg_* port. After reset all
// slots are disabled and every packet is blocked. A packet presented with
// pkt_valid is compared against all slots in parallel and the verdict
// appears on the next clock: out_valid with out_pass = 1 (active port) or
// 0 (inactive port), and out_port repeating the port. A configuration
// write takes effect for packets presented from the next cycle on.
// The pass/block function is described for the design; the slot count,
// the configuration port and the one-cycle latency are this design's
// choices. Reset is active low and synchronous.
module port_monitor #(
  parameter int unsigned N_PORTS = 8
) (
  input  logic                       clk,
  input  logic                       reset_n,
  // configuration of the active-port list
  input  logic                       cfg_we,
  input  logic [$clog2(N_PORTS)-1:0] cfg_idx,
  input  logic [15:0]                cfg_port,
  input  logic                       cfg_en,
  // packet stream
  input  logic                       pkt_valid,
  input  logic [15:0]                pkt_port,
  // verdict, one cycle later
  output logic                       out_valid,
  output logic                       out_pass,
  output logic [15:0]                out_port
);

  logic [15:0]        port_q [N_PORTS];
  logic [N_PORTS-1:0] en_q;
  logic               hit;

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < N_PORTS; i++)
      if (en_q[i] && port_q[i] == pkt_port) hit = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      en_q      <= '0;
      out_valid <= 1'b0;
      out_pass  <= 1'b0;
      out_port  <= '0;
      for (int i = 0; i < N_PORTS; i++) port_q[i] <= '0;
    end else begin
      if (cfg_we) begin
        port_q[cfg_idx] <= cfg_port;
        en_q[cfg_idx]   <= cfg_en;
      end
      out_valid <= pkt_valid;
      out_pass  <= pkt_valid && hit;
      out_port  <= pkt_port;
    end
  end

endmodule
