// acq_prn_gen: GPS C/A code generator with upsampling to N samples per code.
//
// Each of the 32 GPS satellites has its own 1023-chip C/A code; the engine
// needs it resampled so that one code period (1 ms) spans N samples, N being
// the FFT length (32768 at 32.768 MHz). The code itself is the standard GPS
// Gold code: two 10-stage shift registers G1 (x^10 + x^3 + 1) and
// G2 (x^10 + x^9 + x^8 + x^6 + x^3 + x^2 + 1), both started at all ones; the
// chip is G1 stage 10 xor the two G2 stages selected for the satellite
// (the phase-selector taps of the GPS interface specification).
//
// Upsampling: sample k carries chip floor(k * 1023 / N). A phase accumulator
// adds 1023 per sample and the shift registers step whenever it wraps past
// N, so at most one chip step happens per sample (N >= 1023).
//
// Interface: 'restart' (one clock) selects satellite sat_id and rewinds to
// sample 0; 'advance' moves to the next sample. chip_bit is the chip of the
// current sample, 0 for +1 and 1 for -1 (xor maps to multiplication).
module acq_prn_gen
  import acq_pkg::*;
#(
  parameter int unsigned N = 32768
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic [SAT_W-1:0] sat_id,
  input  logic             advance,
  output logic             chip_bit
);

  localparam int unsigned AW = $clog2(N) + 1;

  logic [10:1]    g1, g2;
  logic [3:0]     tap_a, tap_b;
  logic [AW-1:0]  acc;
  logic [AW-1:0]  acc_next;
  logic [SAT_W-1:0] sat_q;

  // G2 phase-selector taps per satellite (GPS interface specification).
  always_comb begin
    unique case (sat_q)
      6'd1:  {tap_a, tap_b} = {4'd2, 4'd6};
      6'd2:  {tap_a, tap_b} = {4'd3, 4'd7};
      6'd3:  {tap_a, tap_b} = {4'd4, 4'd8};
      6'd4:  {tap_a, tap_b} = {4'd5, 4'd9};
      6'd5:  {tap_a, tap_b} = {4'd1, 4'd9};
      6'd6:  {tap_a, tap_b} = {4'd2, 4'd10};
      6'd7:  {tap_a, tap_b} = {4'd1, 4'd8};
      6'd8:  {tap_a, tap_b} = {4'd2, 4'd9};
      6'd9:  {tap_a, tap_b} = {4'd3, 4'd10};
      6'd10: {tap_a, tap_b} = {4'd2, 4'd3};
      6'd11: {tap_a, tap_b} = {4'd3, 4'd4};
      6'd12: {tap_a, tap_b} = {4'd5, 4'd6};
      6'd13: {tap_a, tap_b} = {4'd6, 4'd7};
      6'd14: {tap_a, tap_b} = {4'd7, 4'd8};
      6'd15: {tap_a, tap_b} = {4'd8, 4'd9};
      6'd16: {tap_a, tap_b} = {4'd9, 4'd10};
      6'd17: {tap_a, tap_b} = {4'd1, 4'd4};
      6'd18: {tap_a, tap_b} = {4'd2, 4'd5};
      6'd19: {tap_a, tap_b} = {4'd3, 4'd6};
      6'd20: {tap_a, tap_b} = {4'd4, 4'd7};
      6'd21: {tap_a, tap_b} = {4'd5, 4'd8};
      6'd22: {tap_a, tap_b} = {4'd6, 4'd9};
      6'd23: {tap_a, tap_b} = {4'd1, 4'd3};
      6'd24: {tap_a, tap_b} = {4'd4, 4'd6};
      6'd25: {tap_a, tap_b} = {4'd5, 4'd7};
      6'd26: {tap_a, tap_b} = {4'd6, 4'd8};
      6'd27: {tap_a, tap_b} = {4'd7, 4'd9};
      6'd28: {tap_a, tap_b} = {4'd8, 4'd10};
      6'd29: {tap_a, tap_b} = {4'd1, 4'd6};
      6'd30: {tap_a, tap_b} = {4'd2, 4'd7};
      6'd31: {tap_a, tap_b} = {4'd3, 4'd8};
      6'd32: {tap_a, tap_b} = {4'd4, 4'd9};
      default: {tap_a, tap_b} = {4'd2, 4'd6};
    endcase
  end

  assign chip_bit = g1[10] ^ g2[tap_a] ^ g2[tap_b];
  assign acc_next = acc + AW'(CA_CHIPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1    <= '1;
      g2    <= '1;
      acc   <= '0;
      sat_q <= SAT_W'(1);
    end else if (restart) begin
      g1    <= '1;
      g2    <= '1;
      acc   <= '0;
      sat_q <= sat_id;
    end else if (advance) begin
      if (acc_next >= AW'(N)) begin
        acc <= acc_next - AW'(N);
        g1  <= {g1[9:1], g1[3] ^ g1[10]};
        g2  <= {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
      end else begin
        acc <= acc_next;
      end
    end
  end

endmodule
