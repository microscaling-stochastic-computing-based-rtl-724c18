// Sequencer of the MX-SC array.
//
// One operation multiplies the N row blocks by the N column blocks held in
// the operand buffers. The sequencer
//   STREAM: steps the buffer read index through the k_len elements, holding
//           each element for L/P cycles, the time the SNGs need to emit a
//           bitstream of length L at P bits per cycle. It raises the stream
//           flags vld (every cycle), clr (first cycle) and fin (last cycle).
//   WAIT:   waits until the bottom-right PE reports that it has finished.
//   LOAD:   copies every PE accumulator into its drain register.
//   DRAIN:  shifts the drain registers down N times; each cycle one array
//           row (bottom row first) is presented to the Format Converter and
//           conv_row tells which row it is.
//   LAST:   lets the Format Converter write its last block, then pulses done.
// L/P cycles per element follows the architecture's parallel bitstream
// generation; the rest of the schedule is this design's.
//
// Timing: start is sampled in IDLE. With the array's 2N-1 cycle skew and
// pipeline, done is high exactly k_len*L/P + 3N + 3 cycles after the cycle
// in which start was sampled, for one cycle. A k_len of zero is ignored and
// one above DEPTH is treated as DEPTH.
module mxsc_ctrl
  import mxsc_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned P     = 8,
  parameter int unsigned L     = SC_L,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned LW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned KW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [KW-1:0] k_len,
  input  logic          pe_done,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] rd_idx,
  output logic          s_vld,
  output logic          s_clr,
  output logic          s_fin,
  output logic          drain_load,
  output logic          drain_shift,
  output logic          conv_valid,
  output logic [LW-1:0] conv_row
);

  localparam int unsigned C  = L / P;  // cycles per element
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1;

  typedef enum logic [2:0] {S_IDLE, S_STREAM, S_WAIT, S_LOAD, S_DRAIN, S_LAST} state_t;

  state_t        state;
  logic [IW-1:0] idx;
  logic [IW-1:0] idx_last;
  logic [CW-1:0] sub;
  logic [LW-1:0] row;
  logic          last_cycle;

  assign last_cycle = (idx == idx_last) && (sub == CW'(C - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      idx      <= '0;
      idx_last <= '0;
      sub      <= '0;
      row      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && k_len != '0) begin
          state    <= S_STREAM;
          idx      <= '0;
          sub      <= '0;
          idx_last <= (k_len > KW'(DEPTH)) ? IW'(DEPTH - 1) : IW'(k_len - 1'b1);
        end
        S_STREAM: begin
          if (last_cycle) begin
            state <= S_WAIT;
          end else if (sub == CW'(C - 1)) begin
            sub <= '0;
            idx <= idx + 1'b1;
          end else begin
            sub <= sub + 1'b1;
          end
        end
        S_WAIT: if (pe_done) state <= S_LOAD;
        S_LOAD: begin
          state <= S_DRAIN;
          row   <= LW'(N - 1);
        end
        S_DRAIN: begin
          if (row == '0) state <= S_LAST;
          else row <= row - 1'b1;
        end
        S_LAST: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state != S_IDLE);
    rd_idx      = idx;
    s_vld       = (state == S_STREAM);
    s_clr       = (state == S_STREAM) && (idx == '0) && (sub == '0);
    s_fin       = (state == S_STREAM) && last_cycle;
    drain_load  = (state == S_LOAD);
    drain_shift = (state == S_DRAIN);
    conv_valid  = (state == S_DRAIN);
    conv_row    = row;
  end

  initial begin
    assert (L % P == 0) else $error("L must be a multiple of P");
  end

endmodule
