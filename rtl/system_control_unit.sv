// system_control_unit -- sequencing and channel-interleaving schedule.
//
// States: ST_CONFIG after reset or whenever run is low (coefficients may be
// programmed, the feature records are cleared, the channel pointer returns to
// channel #01); ST_PRELOAD once run is high, while the first PRELOAD = 39 x 16
// samples fill the input systolic buffer; ST_RUN afterwards, where every
// sample is processed with no bubble.  A sample is accepted when run and
// in_valid are both high; shift_en then advances both systolic buffers and
// the channel pointer ch (0..N_CH-1, in the frontend's order).  ts counts
// complete rounds of N_CH samples, i.e. it is the sample index of every
// channel, and serves as spike timestamp.  proc_en marks accepted samples in
// ST_RUN: detection and feature extraction act only then.
// Timing: all outputs except shift_en/proc_en/clear are registered; those
// three are combinational from run, in_valid and the state.
// From the source description: the 39 x 16-cycle preload and continuous
// channel-by-channel operation afterwards.  Own choices: the run/in_valid
// handshake, the state encoding and the timestamp counter.
module system_control_unit
  import neusort_pkg::*;
#(
  parameter int unsigned N       = N_CH,
  parameter int unsigned NPRE    = PRELOAD,
  parameter int unsigned TSW     = TS_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic                    in_valid,
  output logic                    shift_en,
  output logic                    proc_en,
  output logic                    clear,
  output logic [$clog2(N)-1:0]    ch,
  output logic [TSW-1:0]          ts,
  output ctrl_state_t             state
);

  localparam int unsigned PW = $clog2(NPRE + 1);

  logic [PW-1:0] pcnt;   // samples accepted during preload

  assign shift_en = run && in_valid;
  assign proc_en  = shift_en && (state == ST_RUN);
  assign clear    = !run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_CONFIG;
      ch    <= '0;
      ts    <= '0;
      pcnt  <= '0;
    end else if (!run) begin
      state <= ST_CONFIG;
      ch    <= '0;
      ts    <= '0;
      pcnt  <= '0;
    end else if (in_valid) begin
      if (ch == $clog2(N)'(N - 1)) begin
        ch <= '0;
        ts <= ts + 1'b1;
      end else begin
        ch <= ch + 1'b1;
      end
      unique case (state)
        ST_CONFIG: begin
          pcnt  <= PW'(1);
          state <= (NPRE <= 1) ? ST_RUN : ST_PRELOAD;
        end
        ST_PRELOAD: begin
          pcnt <= pcnt + 1'b1;
          if (pcnt == PW'(NPRE - 1)) state <= ST_RUN;
        end
        default: ;
      endcase
    end
  end

endmodule
