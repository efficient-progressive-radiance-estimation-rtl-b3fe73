// aftso_util_run: harness that drives one aftso_hpuoc with N_SET lanes
// through a fixed photon stream and measures lane utilisation.
//
// The stream is the same for every instance: NPH photons whose hit-point
// counts come from a deterministic hash of the photon number (mostly 60..190
// hit-points, every tenth photon 0..5).  Photons are offered back to back and
// held while busy.  After the stream a flush empties the buffer.  The harness
// counts dispatched lanes and the cycles between the first and the last cycle
// with a valid lane, and checks that the lanes carry exactly the expected
// index-table addresses in order.
module aftso_util_run
  import pree_pkg::*;
#(
    parameter int N_SET = 4,
    parameter int NPH   = 2000
) (
    input  logic clk,
    input  logic rst_n,
    output logic finished,
    output int   lanes,
    output int   total,
    output int   span,
    output int   errors
);

  logic          in_valid, flush, busy;
  photon_entry_t in_entry;
  logic          out_valid    [N_SET];
  logic [31:0]   out_ref_addr [N_SET];
  photon_t       out_photon   [N_SET];

  aftso_hpuoc #(.N_SET(N_SET)) dut (.*);

  function automatic int unsigned n_of(int k);
    int unsigned h;
    h = (k * 32'd2654435761) ^ (k >> 3);
    h = h ^ (h >> 13);
    return (k % 10 == 3) ? h % 6 : 60 + h % 131;
  endfunction

  int unsigned exp_addr [$];
  int first = -1, last = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      int nv;
      nv = 0;
      for (int l = 0; l < N_SET; l++) begin
        if (out_valid[l]) begin
          nv++;
          if (exp_addr.size() == 0 || out_ref_addr[l] != exp_addr.pop_front()) errors++;
        end
      end
      if (nv > 0) begin
        if (first < 0) first = cyc;
        last = cyc;
        lanes += nv;
      end
    end
  end

  assign span = last - first + 1;

  initial begin
    int unsigned pa;
    finished = 1'b0; lanes = 0; total = 0; errors = 0;
    in_valid = 1'b0; flush = 1'b0; in_entry = '0;
    pa = 0;
    @(posedge rst_n);
    @(negedge clk);
    for (int k = 0; k < NPH; k++) begin
      int unsigned n;
      n = n_of(k);
      in_valid = 1'b1;
      in_entry.ph = '0;
      in_entry.ph.pos.x = k;
      in_entry.p_addr = pa;
      in_entry.n_hp = n;
      for (int j = int'(n) - 1; j >= 0; j--) exp_addr.push_back(pa + j);
      pa += n;
      total += n;
      #1;
      while (busy) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    flush = 1'b1;
    while (lanes < total) @(negedge clk);
    flush = 1'b0;
    finished = 1'b1;
  end

endmodule
