// acq_controller: steps the search over satellites and frequency bins.
//
// For each satellite from sat_first to sat_last, and for each of the
// NUM_BINS frequency bins, it rewinds the PRN source to the satellite's code
// (prn_restart, one clock), opens the sample stream for exactly N accepted
// samples (stream_en), and then waits for the peak detector's result of that
// cell (pk_valid) before moving on. The fine-detection stage gives its
// verdict with the last bin of a satellite; the controller then moves to the
// next satellite with a new PRN code, as the description's loop does, and
// pulses 'done' after the last one. cur_sat and cur_bin tell the carrier and
// PRN sources which cell is being searched. The ordering (all bins of one
// satellite, then the next satellite) and the one-cell-at-a-time schedule
// are this design's choices.
module acq_controller
  import acq_pkg::*;
#(
  parameter int unsigned N        = 32768,
  parameter int unsigned NUM_BINS = ACQ_NUM_BINS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SAT_W-1:0] sat_first,
  input  logic [SAT_W-1:0] sat_last,
  input  logic             sample_fire,   // a sample was accepted this clock
  input  logic             pk_valid,      // peak detector finished the cell
  output logic             prn_restart,
  output logic             stream_en,
  output logic [SAT_W-1:0] cur_sat,
  output logic [BIN_W-1:0] cur_bin,
  output logic             busy,
  output logic             done
);

  localparam int unsigned L = $clog2(N);

  typedef enum logic [2:0] {IDLE, PRN_RST, STREAM, WAIT_RES, NEXT_SAT, FINISH} ctl_state_t;
  ctl_state_t state;

  logic [L-1:0]     cnt;
  logic [SAT_W-1:0] last_q;

  assign prn_restart = (state == PRN_RST);
  assign stream_en   = (state == STREAM);
  assign busy        = (state != IDLE);
  assign done        = (state == FINISH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      cur_sat <= SAT_W'(1);
      cur_bin <= '0;
      last_q  <= SAT_W'(1);
    end else begin
      unique case (state)
        IDLE: if (start) begin
          cur_sat <= sat_first;
          last_q  <= sat_last;
          cur_bin <= '0;
          state   <= PRN_RST;
        end
        PRN_RST: begin
          cnt   <= '0;
          state <= STREAM;
        end
        STREAM: if (sample_fire) begin
          cnt <= cnt + 1'b1;
          if (cnt == L'(N - 1)) state <= WAIT_RES;
        end
        WAIT_RES: if (pk_valid) begin
          if (cur_bin == BIN_W'(NUM_BINS - 1)) begin
            state <= NEXT_SAT;
          end else begin
            cur_bin <= cur_bin + 1'b1;
            state   <= PRN_RST;
          end
        end
        NEXT_SAT: begin
          if (cur_sat == last_q) begin
            state <= FINISH;
          end else begin
            cur_sat <= cur_sat + 1'b1;
            cur_bin <= '0;
            state   <= PRN_RST;
          end
        end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
