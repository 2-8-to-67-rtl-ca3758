// mbp_s3_ctl: block-engine stage controller (MB pipeline stage 3).
// On each tick with a valid MB it hands the MB result of fine prediction to
// the block engine (compensation, reconstruction, transform/quantisation,
// entropy coding and, if enabled, deblocking) with a be_start pulse and
// waits for be_done; then it presents the MB result on out_* for one cycle.
// The block-engine processing elements are outside this design; only their
// start/done handshake is defined here. done pulses once per tick.
module mbp_s3_ctl
  import enc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    go,
  input  logic    valid,
  input  param_t  prm,
  input  mb_res_t res_in,
  output logic    be_start,
  output mb_res_t be_res,
  output logic    be_db_en,
  input  logic    be_done,
  output logic    out_valid,
  output mb_res_t out_res,
  output logic    done
);
  typedef enum logic [1:0] {C_IDLE, C_WAIT} s3state_e;
  s3state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      be_start <= 1'b0; be_res <= '0; be_db_en <= 1'b0;
      out_valid <= 1'b0; out_res <= '0; done <= 1'b0;
    end else begin
      be_start  <= 1'b0;
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        C_IDLE: if (go) begin
          if (!valid) done <= 1'b1;
          else begin
            be_start <= 1'b1;
            be_res   <= res_in;
            be_db_en <= prm.en_db;
            state    <= C_WAIT;
          end
        end
        C_WAIT: if (be_done) begin
          out_valid <= 1'b1;
          out_res   <= be_res;
          done      <= 1'b1;
          state     <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
