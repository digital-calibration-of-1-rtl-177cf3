// cal_capture: collects the calibration bits from the ADC into the bit store.
//
// For i = N_CAL_STG down to 1 it switches the reference VrefH into stage i
// (cal_sel = i), waits SETTLE clocks for the pipeline and the alignment
// registers to fill, samples the redundancy-removed word, and writes bits
// D_15 .. D_i of it, one per clock, at the addresses the controller reads
// them from (stage 11 first, each group D_15 first). Then cal_sel returns to
// 0 and done stays high until rst.
// That the ADC's calibration outputs are stored in memory, stage by stage,
// follows the calibration method; this sequencer and its timing are this
// design's own. Timing: start is sampled while idle; the run takes
// 11*SETTLE + 110 + 1 clocks. rst is synchronous, active high.
module cal_capture
  import cal_pkg::*;
#(
  parameter int SETTLE = 2 * N_STAGES + 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [N_CALI-1:0] adc_word,
  output logic [3:0]        cal_sel,
  output logic              bit_we,
  output logic [BIT_AW-1:0] bit_waddr,
  output logic              bit_wdata,
  output logic              done
);

  typedef enum logic [1:0] {P_IDLE, P_SETTLE, P_WRITE, P_DONE} cap_state_t;
  cap_state_t state;

  logic [STG_W-1:0]  i, k;
  logic [15:0]       cnt;
  logic [N_CALI-1:0] word_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= P_IDLE;
      i      <= STG_W'(N_CAL_STG);
      k      <= STG_W'(N_CALI);
      cnt    <= '0;
      word_q <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (start) begin
          i     <= STG_W'(N_CAL_STG);
          cnt   <= '0;
          state <= P_SETTLE;
        end
        P_SETTLE: begin
          if (int'(cnt) == SETTLE - 1) begin
            word_q <= adc_word;
            k      <= STG_W'(N_CALI);
            state  <= P_WRITE;
          end
          cnt <= cnt + 1'b1;
        end
        P_WRITE: begin
          if (k == i) begin
            if (i == 1) begin
              state <= P_DONE;
            end else begin
              i     <= i - 1'b1;
              cnt   <= '0;
              state <= P_SETTLE;
            end
          end else begin
            k <= k - 1'b1;
          end
        end
        P_DONE:  state <= P_DONE;
        default: state <= P_IDLE;
      endcase
    end
  end

  assign cal_sel   = (state == P_SETTLE || state == P_WRITE) ? i : 4'd0;
  assign bit_we    = (state == P_WRITE);
  assign bit_waddr = bit_addr(int'(i), int'(k));
  assign bit_wdata = word_q[N_CALI - int'(k)];
  assign done      = (state == P_DONE);

  // Every write lands inside the bit store, and done, once high, holds until rst.
  a_waddr_range: assert property (@(posedge clk) disable iff (rst)
                                  bit_we |-> int'(bit_waddr) < N_BITS_MEM);
  a_done_holds:  assert property (@(posedge clk) disable iff (rst)
                                  done |=> done);

endmodule
