// acq_peak_detector: finds the correlation peak, its code phase and the
// second-highest peak in the stored |u|^2 values of one search cell.
//
// After 'start' it scans the magnitude memory twice, one address per clock
// (the memory answers one clock after the address):
//   pass 1  each value is compared with the largest seen so far; the largest
//           value and its index (the code phase, in samples) are kept. On a
//           tie the earlier index wins.
//   pass 2  the same scan keeps the largest value whose circular distance
//           from the peak index is more than EXCL samples (one code chip), so
//           the peak's own correlation triangle is not taken as the second
//           peak.
// The ratio of the two peaks is the detection metric used downstream.
// Finding the maximum and its index by comparing the stored samples is the
// description's; the sequential one-compare-per-clock scan and the second
// pass are this design's choices. res_valid pulses for one clock with the
// result, 2*N + 3 clocks after start.
module acq_peak_detector
  import acq_pkg::*;
#(
  parameter int unsigned N     = 32768,
  parameter int unsigned MAG_W = 64,
  parameter int unsigned EXCL  = (N + 511) / 1023
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic [$clog2(N)-1:0] raddr,
  input  logic [MAG_W-1:0]     rdata,
  output logic                 res_valid,
  output peak_result_t         res
);

  localparam int unsigned L = $clog2(N);

  typedef enum logic [1:0] {IDLE, SCAN, DONE} pd_state_t;
  pd_state_t state;

  logic             pass2, issuing, pipe_v;
  logic [L-1:0]     addr, pipe_idx, best_idx, cdist;
  logic [MAG_W-1:0] best, second;
  logic             far;

  assign raddr = addr;
  assign busy  = (state != IDLE);
  assign cdist  = pipe_idx - best_idx;
  assign far   = (cdist > L'(EXCL)) && (cdist < L'(N - EXCL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      pass2    <= 1'b0;
      issuing  <= 1'b0;
      pipe_v   <= 1'b0;
      addr     <= '0;
      pipe_idx <= '0;
      best_idx <= '0;
      best     <= '0;
      second   <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          pipe_v <= 1'b0;
          if (start) begin
            state    <= SCAN;
            pass2    <= 1'b0;
            issuing  <= 1'b1;
            addr     <= '0;
            best     <= '0;
            best_idx <= '0;
            second   <= '0;
          end
        end
        SCAN: begin
          if (issuing) begin
            addr <= addr + 1'b1;
            if (addr == L'(N - 1)) issuing <= 1'b0;
          end
          pipe_v   <= issuing;
          pipe_idx <= addr;
          if (pipe_v) begin
            if (!pass2) begin
              if (rdata > best) begin
                best     <= rdata;
                best_idx <= pipe_idx;
              end
            end else if (far && rdata > second) begin
              second <= rdata;
            end
            if (pipe_idx == L'(N - 1)) begin
              if (!pass2) begin
                pass2   <= 1'b1;
                issuing <= 1'b1;
                addr    <= '0;
              end else begin
                state <= DONE;
              end
            end
          end
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign res_valid       = (state == DONE);
  assign res.peak        = 64'(best);
  assign res.second      = 64'(second);
  assign res.code_phase  = 16'(best_idx);

endmodule
