// bist_ctrl: test sequencer of the partitioned test-per-scan BIST.
//
// A session starts with a pulse on start (which also clears the MISR) and
// applies NUM_PATTERNS patterns. For each pattern:
//   * SHIFT: the partitions are shifted one after another. While partition p
//     is shifted, only part_ctrl[p] is high (only its clock runs), shift_en is
//     high and the scan LFSR steps once per cycle; partition p takes
//     part_len(NUM_SFF, K, p) cycles. In the first cycle of that phase
//     pi_load[p] loads new random values into primary-input partition p, so
//     at any time only one partition of inputs and flip-flops changes.
//   * CAPTURE: one cycle per partition, again one partition at a time, with
//     shift_en low so that partition captures the combinational response.
// After the last pattern one more SHIFT pass (no capture) unloads the final
// response, then done is raised and held until the next start. The MISR is
// enabled in every SHIFT and CAPTURE cycle except during the first load of a
// session, whose scan-out is whatever the flip-flops held before the session
// and would make the signature depend on it.
// Cycle count of a session: (NUM_PATTERNS+1)*NUM_SFF + NUM_PATTERNS*K, plus
// one cycle from start to the first shift.
// The active partition comes from partition_sel (modulo-K counter and
// decoder). One-partition-at-a-time shifting and clocking follow the
// document; the order of phases, one capture cycle per partition, the PI
// update point, the final unload pass and skipping the first unload in the
// MISR are this design's choices.
// All outputs are decoded from registers, so they are stable for a whole
// clock cycle and safe as clock-gate enables.
module bist_ctrl #(
  parameter int unsigned K            = 2,
  parameter int unsigned NUM_SFF      = 74,
  parameter int unsigned NUM_PATTERNS = 1024,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = $clog2(NUM_SFF + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         shift_en,
  output logic         capture,
  output logic [K-1:0] part_ctrl,
  output logic [K-1:0] pi_load,
  output logic         scan_lfsr_en,
  output logic         misr_en,
  output logic         misr_clear,
  output logic         busy,
  output logic         done,
  output logic [31:0]  pattern
);
  import lpbist_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CAPTURE, S_DONE} state_e;

  state_e         state;
  logic [CW-1:0]  cnt;
  logic           unload;
  logic           first;
  logic [SW-1:0]  sel;
  logic [K-1:0]   ctrl;
  logic           adv, clr;
  logic           last_shift, last_part;

  initial assert (NUM_SFF >= K && K >= 1 && NUM_PATTERNS >= 1)
    else $error("bist_ctrl: need NUM_SFF >= K >= 1 and NUM_PATTERNS >= 1");

  partition_sel #(.K(K)) u_sel (
    .clk, .rst_n, .clear(clr), .advance(adv), .sel, .ctrl
  );

  assign last_part  = (sel == SW'(K - 1));
  assign last_shift = (32'(cnt) == part_len(NUM_SFF, K, 32'(sel)) - 1);

  assign clr = (state inside {S_IDLE, S_DONE}) && start;
  assign adv = ((state == S_SHIFT) && last_shift) || (state == S_CAPTURE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      unload  <= 1'b0;
      first   <= 1'b0;
      pattern <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state   <= S_SHIFT;
          cnt     <= '0;
          unload  <= 1'b0;
          first   <= 1'b1;
          pattern <= '0;
        end
        S_SHIFT: begin
          if (last_shift) begin
            cnt <= '0;
            if (last_part) begin
              state <= unload ? S_DONE : S_CAPTURE;
              first <= 1'b0;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_CAPTURE: if (last_part) begin
          state   <= S_SHIFT;
          pattern <= pattern + 1;
          if (pattern + 1 == NUM_PATTERNS) unload <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign shift_en     = (state == S_SHIFT);
  assign capture      = (state == S_CAPTURE);
  assign busy         = shift_en || capture;
  assign done         = (state == S_DONE);
  assign part_ctrl    = busy ? ctrl : '0;
  assign pi_load      = (shift_en && cnt == '0 && !unload) ? ctrl : '0;
  assign scan_lfsr_en = shift_en;
  assign misr_en      = capture || (shift_en && !first);
  assign misr_clear   = clr;

  // At most one partition is clocked in test mode.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(part_ctrl));

endmodule
