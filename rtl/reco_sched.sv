// Run scheduler for the recomputing (RESO / RERO / modified RESO) units.
//
// Every operand set must pass the unit twice: once as is (N, 1st run) and
// once encoded (E, 2nd run). The scheduler accepts operand sets on a
// valid/ready stream, issues each at once as a 1st run and keeps a copy, and
// after G sets (or earlier, if the stream pauses) re-issues the kept copies in
// the same order as 2nd runs. With the unit split into two pipeline stages
// this keeps both stages busy:
//   G = 1:  N1 E1 N2 E2 N3 E3 ...   (each set rerun right behind itself)
//   G = 2:  N1 N2 E1 E2 N3 N4 E3 E4 ...
// so the unit delivers one checked result every two cycles either way; a
// larger G trades buffer area for a longer gap between a run and its rerun.
// Outputs are registered: iss_valid/iss_enc/iss_data show the run being fed to
// the first pipeline stage in this cycle. in_ready is combinational from state.
module reco_sched #(
  parameter int unsigned DW = 32,
  parameter int unsigned G  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          iss_valid,
  output logic          iss_enc,
  output logic [DW-1:0] iss_data
);
  localparam int unsigned CW = $clog2(G + 1);

  typedef enum logic {S_NORM, S_ENC} phase_t;

  phase_t        phase;
  logic [DW-1:0] keep [G];
  logic [CW-1:0] cnt, eidx;

  assign in_ready = (phase == S_NORM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= S_NORM;
      cnt       <= '0;
      eidx      <= '0;
      iss_valid <= 1'b0;
      iss_enc   <= 1'b0;
      iss_data  <= '0;
      for (int i = 0; i < G; i++) keep[i] <= '0;
    end else begin
      iss_valid <= 1'b0;
      iss_enc   <= 1'b0;
      case (phase)
        S_NORM: begin
          if (in_valid) begin
            iss_valid <= 1'b1;
            iss_data  <= in_data;
            keep[cnt] <= in_data;
            cnt       <= cnt + 1'b1;
            eidx      <= '0;
            if (32'(cnt) + 1 == G) phase <= S_ENC;
          end else if (cnt != 0) begin
            // The stream paused: rerun what has been kept so far.
            iss_valid <= 1'b1;
            iss_enc   <= 1'b1;
            iss_data  <= keep[0];
            if (cnt == 1) begin
              cnt <= '0;
            end else begin
              eidx  <= 1;
              phase <= S_ENC;
            end
          end
        end
        S_ENC: begin
          iss_valid <= 1'b1;
          iss_enc   <= 1'b1;
          iss_data  <= keep[eidx];
          if (eidx == cnt - 1'b1) begin
            cnt   <= '0;
            phase <= S_NORM;
          end else begin
            eidx <= eidx + 1'b1;
          end
        end
        default: phase <= S_NORM;
      endcase
    end
  end
endmodule
