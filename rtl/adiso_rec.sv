// adiso_rec: approximate data-independent schedule-oriented radiance
// evaluation controller (leaping address generator).
//
// Hit-points produced by one pixel sit at neighbouring memory addresses.  In
// radiance evaluation every hit-point adds into its pixel, so fetching them
// in address order would put two updates of the same pixel into a PREU
// pipeline at once (read-after-write hazard).  This block splits the
// N_hit-point stored hit-points into N_SET groups, one per PREU, and walks
// each group with a stride of
//   leaping_value = N_hit-point >> clog2(N_SET * N_PIP)      (>> 6 for 4, 12)
// Per group i, every cycle:
//   leaping_addr <- leaping_addr + leaping_value, unless that reaches the
//   group end, in which case start_addr <- start_addr + 1 and
//   leaping_addr <- start_addr + 1.
// so every address of the group is produced exactly once, and neighbouring
// addresses are about group_size / leaping_value cycles apart.
//
// Group ends (registers Reg_end_i): N>>2, N>>1, (N>>2)+(N>>1), N for
// N_SET = 4; in general the sum of N >> (log2 N_SET - b) over the set bits b
// of i+1.  Group i starts at the end of group i-1.
//
// Interface: start (one cycle, while idle) loads n_hit.  From the next cycle
// on each lane i presents one address per cycle with addr_valid[i] = 1 until
// its group is exhausted; invalid lanes show address 0.  busy is high while
// any lane has addresses left; done pulses for one cycle after the last.
// There is no back-pressure: the consumer takes four addresses per cycle.
//
// Stride, group boundaries, restart rule and the 0 output of idle lanes
// follow the engine's description.  Counting issued addresses per group to
// stop, and using a stride of 1 when N_hit-point is below 2^6, are this
// design's choices.
module adiso_rec #(
    parameter int unsigned N_SET  = 4,
    parameter int unsigned N_PIP  = 12,
    parameter int unsigned ADDR_W = 32
) (
    input  logic              clk,
    input  logic              rst_n,
    input  logic              start,
    input  logic [ADDR_W-1:0] n_hit,
    output logic              addr_valid [N_SET],
    output logic [ADDR_W-1:0] addr       [N_SET],
    output logic              busy,
    output logic              done
);

  localparam int unsigned LOG2_SET = $clog2(N_SET);
  localparam int unsigned LEAP_SH  = $clog2(N_SET * N_PIP);

  logic [ADDR_W-1:0] reg_start [N_SET];
  logic [ADDR_W-1:0] reg_end   [N_SET];
  logic [ADDR_W-1:0] reg_leap  [N_SET];   // Reg_leaping_addr_i
  logic [ADDR_W-1:0] reg_left  [N_SET];   // addresses still to issue
  logic [ADDR_W-1:0] reg_leaping;         // leaping_value
  logic              busy_q;

  // group ends from shifted copies of n_hit
  logic [ADDR_W-1:0] end_d   [N_SET];
  logic [ADDR_W-1:0] begin_d [N_SET];
  always_comb begin
    for (int i = 0; i < int'(N_SET); i++) begin
      end_d[i] = '0;
      for (int b = 0; b <= int'(LOG2_SET); b++) begin
        if ((((i + 1) >> b) & 1) != 0) end_d[i] = end_d[i] + (n_hit >> (int'(LOG2_SET) - b));
      end
      begin_d[i] = (i == 0) ? '0 : end_d[i == 0 ? 0 : i - 1];
    end
  end

  // addresses left after this cycle's issue
  logic [ADDR_W-1:0] left_d [N_SET];
  logic              more_d;
  always_comb begin
    more_d = 1'b0;
    for (int i = 0; i < int'(N_SET); i++) begin
      left_d[i] = (reg_left[i] != '0) ? reg_left[i] - 1'b1 : '0;
      more_d   |= (left_d[i] != '0);
    end
  end

  assign busy = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
      for (int i = 0; i < int'(N_SET); i++) reg_left[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy_q) begin
        busy_q <= (n_hit != '0);
        for (int i = 0; i < int'(N_SET); i++) reg_left[i] <= end_d[i] - begin_d[i];
      end else if (busy_q) begin
        for (int i = 0; i < int'(N_SET); i++) reg_left[i] <= left_d[i];
        busy_q <= more_d;
        done   <= !more_d;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy_q) begin
      reg_leaping <= ((n_hit >> LEAP_SH) == '0) ? ADDR_W'(1) : (n_hit >> LEAP_SH);
      for (int i = 0; i < int'(N_SET); i++) begin
        reg_start[i] <= begin_d[i];
        reg_leap[i]  <= begin_d[i];
        reg_end[i]   <= end_d[i];
      end
    end else if (busy_q) begin
      for (int i = 0; i < int'(N_SET); i++) begin
        // restart when the next leap would reach the group end
        if (reg_leap[i] + reg_leaping >= reg_end[i]) begin
          reg_start[i] <= reg_start[i] + 1'b1;
          reg_leap[i]  <= reg_start[i] + 1'b1;
        end else begin
          reg_leap[i]  <= reg_leap[i] + reg_leaping;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N_SET); i++) begin
      addr_valid[i] = busy_q && (reg_left[i] != '0);
      addr[i]       = addr_valid[i] ? reg_leap[i] : '0;
    end
  end

endmodule
