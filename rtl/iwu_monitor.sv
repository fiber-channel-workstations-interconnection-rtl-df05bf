// iwu_monitor: performance monitoring of the interworking unit, a bank of
// event counters the control unit reads.
//
// Every bit of the event struct (iwu_events_t: frames forwarded and stored
// locally, cells sent and received, HEC errors, cell and frame losses
// found through the FAP counters, timeouts, link resets, R_RDYs sent, ...)
// has its own W-bit counter, incremented in each cycle the event pulses and
// held at its maximum rather than wrapping. The control unit reads counter
// `rd_addr` (the bit number of the event in iwu_events_t, 0 = its last field)
// on rd_data one cycle later, and clears all counters with a one-cycle
// `clear` pulse (events in the same cycle are not counted).
// The document lists the monitoring of performance among the FAP functions
// and says the frame and cell counters let losses be detected; the counter
// bank, its width and its read port are this design's choices.
module iwu_monitor
  import fap_pkg::*;
#(
  parameter int W = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  iwu_events_t ev,
  input  logic        clear,
  input  logic [4:0]  rd_addr,
  output logic [W-1:0] rd_data
);
  localparam int N = $bits(iwu_events_t);

  logic [N-1:0]        pulses;
  logic [N-1:0][W-1:0] cnt;

  assign pulses = ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      rd_data <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clear)                           cnt[i] <= '0;
        else if (pulses[i] && cnt[i] != '1)  cnt[i] <= cnt[i] + 1'b1;
      end
      rd_data <= (int'(rd_addr) < N) ? cnt[rd_addr] : '0;
    end
  end
endmodule
