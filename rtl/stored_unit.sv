// stored_unit: packet buffer and per-source table of the DoS analysis unit.
//
// Every cycle in which `we` is high, one packet descriptor {ip_addr,
// data_len} is written into RAM1, a first-in first-out buffer, so the unit
// accepts one 48-bit word per clock. A small controller then takes the
// descriptors out of RAM1 one at a time and folds each into RAM2, a table
// that holds one {IP address, summed data length} entry per sender:
//
//   IDLE    RAM1 not empty: read the oldest descriptor (RAM1_OUT register).
//   LOOKUP  table empty: append the descriptor as entry 0. Otherwise read
//           the newest entry, n_entries-1 (RAM2_OUT register).
//   SEARCH  RAM2_OUT holds the sender: write {ip, len + data_len} back to
//           the same address. Otherwise step to the next older entry
//           (pulse `n_p`) or, after entry 0, append a new entry.
//
// The sizes of both RAMs are this design's choice (16 words each). A
// descriptor that arrives while RAM1 is full is dropped (pulse
// `ram1_drop`); a new sender that finds RAM2 full is not entered (pulse
// `ram2_drop`). Summed lengths saturate at 16'hFFFF.
//
// `clear` (from the detecting unit, at the end of each time window) empties
// the table in one cycle by zeroing n_entries; no RAM2 write happens in
// that cycle and a descriptor being processed is entered into the new,
// empty table. Emptying the table per window is this design's choice.
//
// Every RAM2 write is visible on w_e_2 / w_a_2 / w_d_2; w_d_2 is the
// 48-bit word passed on to the detecting unit. A descriptor costs two
// cycles plus one per table entry searched. The RAM1/RAM2 structure, the
// newest-first search and the signal names follow the design's stored-unit
// simulation trace; reset is active low and synchronous.
module stored_unit
  import hhips_pkg::*;
#(
  parameter int unsigned RAM1_DEPTH = 16,  // descriptor buffer words
  parameter int unsigned RAM2_DEPTH = 16   // table entries (senders)
) (
  input  logic                          clk,
  input  logic                          reset_n,
  // packet descriptors, one per cycle when we = 1
  input  logic                          we,
  input  ip_t                           ip_addr,
  input  len_t                          data_len,
  // empty the table (end of a time window)
  input  logic                          clear,
  // RAM2 write port, also the R_RAM2 output to the detecting unit
  output logic                          w_e_2,
  output logic [$clog2(RAM2_DEPTH)-1:0] w_a_2,
  output entry_t                        w_d_2,
  // status
  output logic                          n_p,
  output logic                          ram1_full,
  output logic                          ram1_drop,
  output logic                          ram2_drop,
  output logic                          busy,
  output logic [$clog2(RAM2_DEPTH+1)-1:0] n_entries
);

  localparam int unsigned A1 = $clog2(RAM1_DEPTH);
  localparam int unsigned A2 = $clog2(RAM2_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_SEARCH} state_t;

  entry_t ram1 [RAM1_DEPTH];
  entry_t ram2 [RAM2_DEPTH];

  logic [A1:0]  w_a_1, r_a_1;        // RAM1 pointers with wrap bit
  logic [A1:0]  ram1_count;
  logic         ram1_empty;
  logic         ram1_wr, ram1_rd;

  state_t       state, state_d;
  entry_t       ram1_out;            // descriptor being processed
  entry_t       ram2_out;            // table entry being compared
  logic [A2-1:0] r_a_2, r_a_2_d;
  logic         ram2_rd;
  logic [$clog2(RAM2_DEPTH+1)-1:0] n_entries_d;

  // ---------------- RAM1: descriptor buffer ----------------
  assign ram1_count = w_a_1 - r_a_1;
  assign ram1_empty = (ram1_count == '0);
  assign ram1_full  = (ram1_count == (A1+1)'(RAM1_DEPTH));
  assign ram1_wr    = we && !ram1_full;
  assign ram1_drop  = we && ram1_full;
  assign ram1_rd    = (state == S_IDLE) && !ram1_empty;

  always_ff @(posedge clk) begin
    if (ram1_wr) ram1[w_a_1[A1-1:0]] <= '{ip: ip_addr, len: data_len};
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      w_a_1    <= '0;
      r_a_1    <= '0;
      ram1_out <= '0;
    end else begin
      if (ram1_wr) w_a_1 <= w_a_1 + 1'b1;
      if (ram1_rd) begin
        ram1_out <= ram1[r_a_1[A1-1:0]];
        r_a_1    <= r_a_1 + 1'b1;
      end
    end
  end

  // ---------------- table controller ----------------
  always_comb begin
    state_d     = state;
    r_a_2_d     = r_a_2;
    ram2_rd     = 1'b0;
    n_entries_d = n_entries;
    w_e_2       = 1'b0;
    w_a_2       = '0;
    w_d_2       = ram1_out;
    n_p         = 1'b0;
    ram2_drop   = 1'b0;

    unique case (state)
      S_IDLE: if (ram1_rd) state_d = S_LOOKUP;

      S_LOOKUP: begin
        if (n_entries == '0) begin
          w_e_2       = 1'b1;              // first sender of the window
          w_a_2       = '0;
          n_entries_d = 1;
          state_d     = S_IDLE;
        end else begin
          r_a_2_d = A2'(n_entries - 1'b1); // newest entry first
          ram2_rd = 1'b1;
          state_d = S_SEARCH;
        end
      end

      S_SEARCH: begin
        if (ram2_out.ip == ram1_out.ip) begin
          w_e_2   = 1'b1;                  // known sender: add its length
          w_a_2   = r_a_2;
          w_d_2   = '{ip: ram1_out.ip, len: sat_add(ram2_out.len, ram1_out.len)};
          state_d = S_IDLE;
        end else if (r_a_2 != '0) begin
          n_p     = 1'b1;                  // step to the next older entry
          r_a_2_d = r_a_2 - 1'b1;
          ram2_rd = 1'b1;
        end else begin
          state_d = S_IDLE;                // not found: new sender
          if (n_entries < ($clog2(RAM2_DEPTH+1))'(RAM2_DEPTH)) begin
            w_e_2       = 1'b1;
            w_a_2       = A2'(n_entries);
            n_entries_d = n_entries + 1'b1;
          end else begin
            ram2_drop = 1'b1;
          end
        end
      end

      default: state_d = S_IDLE;
    endcase

    // End of window: empty the table, write nothing, and restart the
    // descriptor in flight against the empty table.
    if (clear) begin
      n_entries_d = '0;
      w_e_2       = 1'b0;
      ram2_rd     = 1'b0;
      ram2_drop   = 1'b0;
      n_p         = 1'b0;
      if (state != S_IDLE) state_d = S_LOOKUP;
    end
  end

  // ---------------- RAM2: per-sender table ----------------
  always_ff @(posedge clk) begin
    if (w_e_2) ram2[w_a_2] <= w_d_2;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      state     <= S_IDLE;
      r_a_2     <= '0;
      ram2_out  <= '0;
      n_entries <= '0;
    end else begin
      state     <= state_d;
      r_a_2     <= r_a_2_d;
      n_entries <= n_entries_d;
      if (ram2_rd) ram2_out <= ram2[r_a_2_d];
    end
  end

  assign busy = (state != S_IDLE) || !ram1_empty;

  // A table write never targets an address beyond the used entries.
  a_wr_in_range: assert property (@(posedge clk) disable iff (!reset_n)
    w_e_2 |-> ($bits(n_entries)'(w_a_2) <= n_entries));

endmodule
