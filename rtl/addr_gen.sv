// Address generator and sequencer of the converged transform processor.
//
// All addressing derives from two 6-bit counters, read as {x0,x1,x2,x3,x4,x5}
// with x0 the MSB. The read counter issues one set of read addresses per
// cycle; the write counter is the read counter delayed by the pipeline depth,
// and the coefficient ROM address is the read counter delayed by one cycle.
//
// FFT/DCT: the counter runs 0..47; {x0,x1} is the radix-4 step. The four
// addresses read and written (in place) by a butterfly place the loop digit
// m = 0..3 in the digit the step works on:
//   step 0 : {m, x2..x5}    step 1 : {x2,x3, m, x4,x5}    step 2 : {x2..x5, m}
// The datapath is three stages deep, so writes trail reads by two cycles and a
// transform keeps busy high for 48 + 2 = 50 cycles.
// FWT: the counter runs 2..15; {x2,x3} is the step. Two Walsh butterflies per
// cycle read a0..a3 and write a0..a7 in the same cycle (no pipeline), so a
// transform keeps busy high for 14 cycles. Address bit patterns follow the
// document's tables; the digit of the current step carries the output index
// {i[2],i[0]} of address ai, and i[1] selects the butterfly.
// The DCT uses rows 48..63 of the coefficient ROM in its last step, the FFT
// rows 32..47. The handshake (start pulse while idle, busy, one-cycle done
// pulse once the last word is written) is this design's choice.
module addr_gen
  import cfft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mode_e       mode,
  output logic        busy,
  output logic        done,
  output logic        fwt,         // datapath mode bit, held for the run
  output addr_t       rd_addr [4],
  output addr_t       wr_addr [8],
  output logic        wr_en   [8],
  output logic [5:0]  coef_addr    // ROM row for the word in stage 2
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e      state;
  mode_e       mode_q;
  logic [5:0]  rcnt;         // read counter
  logic [5:0]  rcnt_d1, rcnt_d2;
  logic        v_d1, v_d2;   // FFT/DCT pipeline occupancy
  logic        run;

  assign run  = (state == S_RUN);
  assign fwt  = (mode_q == MODE_FWT);
  assign busy = (state != S_IDLE);

  // FFT/DCT butterfly address m of counter value c
  function automatic addr_t fft_addr(logic [5:0] c, logic [1:0] m);
    unique case (c[5:4])
      2'b00:   return {m, c[3:0]};
      2'b01:   return {c[3:2], m, c[1:0]};
      default: return {c[3:0], m};
    endcase
  endfunction

  // FWT address ai of counter value c (i = 0..7)
  function automatic addr_t fwt_addr(logic [3:0] c, logic [2:0] i);
    if (c[3:2] == 2'b00)
      return {i[2], i[0], 1'b0, c[0], 1'b0, i[1]};
    else if (c[3:2] == 2'b01)
      return {c[1:0], i[2], i[0], 1'b0, i[1]};
    else
      return {c[2:0], i[1], i[2], i[0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      mode_q  <= MODE_FFT;
      rcnt    <= '0;
      rcnt_d1 <= '0;
      rcnt_d2 <= '0;
      v_d1    <= 1'b0;
      v_d2    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      rcnt_d1 <= rcnt;
      rcnt_d2 <= rcnt_d1;
      v_d1    <= run && !fwt;
      v_d2    <= v_d1;
      unique case (state)
        S_IDLE: if (start) begin
          mode_q <= mode;
          rcnt   <= (mode == MODE_FWT) ? 6'd2 : 6'd0;
          state  <= S_RUN;
        end
        S_RUN: begin
          rcnt <= rcnt + 6'd1;
          if (fwt && rcnt == 6'd15) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (!fwt && rcnt == 6'd47) begin
            state <= S_DRAIN;
          end
        end
        S_DRAIN: if (!v_d1 && v_d2) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++)
      rd_addr[i] = fwt ? fwt_addr(rcnt[3:0], 3'(i)) : fft_addr(rcnt, 2'(i));
    for (int i = 0; i < 8; i++) begin
      if (fwt) begin
        wr_addr[i] = fwt_addr(rcnt[3:0], 3'(i));
        wr_en[i]   = run;
      end else begin
        wr_addr[i] = fft_addr(rcnt_d2, 2'(i));
        wr_en[i]   = v_d2 && (i < 4);
      end
    end
    coef_addr = {rcnt_d1[5], rcnt_d1[4] | (rcnt_d1[5] && mode_q == MODE_DCT), rcnt_d1[3:0]};
  end

endmodule
