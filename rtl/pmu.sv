// pmu: performance monitoring unit with nine 64-bit event counters.
//
// Counter i adds one in every cycle where `events[i]` is high. The events are
// numbered by `pmu_event_e` in predrac_pkg: cycles, retired instructions,
// branches, mispredicted branches, loads, stores, instruction-cache misses,
// data-cache misses and stall cycles. Software reads them as user-level CSRs
// (the core maps cycle/instret and hpmcounter3..11 onto `sel`); `rdata` is the
// selected counter, combinationally. `clear` zeroes all counters.
//
// The document gives the number of counters (9) and that they are user
// accessible; the choice of events and their numbering are this design's own.
module pmu
  import predrac_pkg::*;
#(
  parameter int unsigned N = PMU_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [N-1:0] events,
  input  logic [3:0]   sel,
  output logic [63:0]  rdata
);
  logic [63:0] cnt [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clear)          cnt[i] <= '0;
        else if (events[i]) cnt[i] <= cnt[i] + 64'd1;
      end
    end
  end

  assign rdata = (int'(sel) < N) ? cnt[sel] : 64'd0;
endmodule
