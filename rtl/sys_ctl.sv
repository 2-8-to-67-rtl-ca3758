// sys_ctl: system controller: coding-parameter register file and the FSM that
// runs the three-stage macroblock pipeline.
//
// The register file (written over the system bus, clocked by its own gated
// clock rf_clk) holds the power-scalability parameters of param_t. Writing 1
// to bit 0 of RA_CTRL starts a run of num_mb macroblocks. The FSM then issues
// num_mb + 2 pipeline ticks: at each tick (go pulse) stage s is given a valid
// MB if one has reached it (stage 1 holds MB t, stage 2 MB t-1, stage 3 MB
// t-2), so up to three MBs are processed at once. The next tick waits until
// all three stage controllers have reported done and, while stage 1 still has
// MBs to take, until the host has announced the next MB (RA_MBRDY).
// frame_done pulses after the last tick completes. RA_STATUS reads back
// {busy, tick count}.
// Pipeline depth and stage names follow the document; the register map,
// tick protocol and MB-ready handshake are this design's.
module sys_ctl
  import enc_pkg::*;
(
  input  logic        clk,
  input  logic        rf_clk,      // gated clock of the register file
  input  logic        rst_n,
  input  logic        rf_we,
  input  logic [7:0]  rf_addr,
  input  logic [31:0] rf_wdata,
  output logic [31:0] rf_rdata,
  output param_t      prm,
  // pipeline control
  output logic        go,
  output logic [2:0]  stage_valid,
  input  logic [2:0]  stage_done,
  output logic        mb_take,     // stage 1 takes the MB from the input buffer
  output logic        busy,
  output logic        frame_done,
  output logic [15:0] tick
);
  typedef enum logic [1:0] {C_IDLE, C_WAITMB, C_RUN} cstate_e;
  cstate_e state;
  logic [2:0] done_seen;
  logic       mb_ready;
  logic       start_req;

  // coding-parameter register file (static, gated clock)
  always_ff @(posedge rf_clk or negedge rst_n) begin
    if (!rst_n) begin
      prm <= '{num_mb: 16'd1, skip_th: 22'd0, n_init: 3'd1, n_ref: 2'd1, n_vbs: 3'd1,
               lambda: 8'd4, en_preskip: 1'b0, en_intra4: 1'b0, en_intra16: 1'b0, en_db: 1'b1};
    end else if (rf_we) begin
      unique case (rf_addr)
        RA_NUMMB:  prm.num_mb  <= rf_wdata[15:0];
        RA_TH:     prm.skip_th <= rf_wdata[21:0];
        RA_NINIT:  prm.n_init  <= rf_wdata[2:0];
        RA_NREF:   prm.n_ref   <= rf_wdata[1:0];
        RA_NVBS:   prm.n_vbs   <= rf_wdata[2:0];
        RA_LAMBDA: prm.lambda  <= rf_wdata[7:0];
        RA_ENABLE: {prm.en_db, prm.en_intra16, prm.en_intra4, prm.en_preskip} <= rf_wdata[3:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rf_addr)
      RA_NUMMB:  rf_rdata = 32'(prm.num_mb);
      RA_TH:     rf_rdata = 32'(prm.skip_th);
      RA_NINIT:  rf_rdata = 32'(prm.n_init);
      RA_NREF:   rf_rdata = 32'(prm.n_ref);
      RA_NVBS:   rf_rdata = 32'(prm.n_vbs);
      RA_LAMBDA: rf_rdata = 32'(prm.lambda);
      RA_ENABLE: rf_rdata = {28'd0, prm.en_db, prm.en_intra16, prm.en_intra4, prm.en_preskip};
      RA_STATUS: rf_rdata = {15'd0, busy, tick};
      default:   rf_rdata = '0;
    endcase
  end

  assign start_req = rf_we && (rf_addr == RA_CTRL) && rf_wdata[0];
  assign busy = (state != C_IDLE);

  // stage s is valid at tick t when 0 <= t - s < num_mb
  function automatic logic [2:0] valid_at(input logic [15:0] t, input logic [15:0] n);
    logic [2:0] v;
    for (int s = 0; s < 3; s++)
      v[s] = (int'(t) >= s) && (int'(t) - s < int'(n));
    return v;
  endfunction

  // stage-valid mask of the coming tick and the stage-done mask so far
  logic [2:0] v_now, d_now;
  assign v_now = valid_at(tick, prm.num_mb);
  assign d_now = done_seen | stage_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      go <= 1'b0; stage_valid <= '0; mb_take <= 1'b0; frame_done <= 1'b0;
      tick <= '0; done_seen <= '0; mb_ready <= 1'b0;
    end else begin
      go <= 1'b0;
      mb_take <= 1'b0;
      frame_done <= 1'b0;
      if (rf_we && rf_addr == RA_MBRDY) mb_ready <= 1'b1;
      unique case (state)
        C_IDLE: if (start_req) begin
          tick  <= '0;
          state <= C_WAITMB;
        end
        C_WAITMB: begin
          if (!v_now[0] || mb_ready) begin
            go          <= 1'b1;
            stage_valid <= v_now;
            mb_take     <= v_now[0];
            if (v_now[0]) mb_ready <= 1'b0;
            done_seen   <= '0;
            state       <= C_RUN;
          end
        end
        C_RUN: begin
          done_seen <= d_now;
          if (!go && d_now == 3'b111) begin
            if (int'(tick) == int'(prm.num_mb) + 1) begin
              frame_done <= 1'b1;
              state      <= C_IDLE;
            end else begin
              tick  <= tick + 16'd1;
              state <= C_WAITMB;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
