// control_unit: sequencer of one 36-pixel block.
//
// A block takes 9 + SORT_EDGES + 1 + 1 clock edges (19 with the default), the
// budget of the original architecture: nine edges with E1 (MUX) and E2 (FIFO) high while the
// select count runs 0..8, SORT_EDGES edges for sorting, one edge for E3 (load
// SISO(n)) and one for E4 (load SISO(n)a). Inside the sorting phase the median
// registers are loaded on edge MED_LOAD_AT of that phase (med_load, counting from
// 0) and the DMR registers on the next one (dmr_load); the remaining edges are slack the original architecture allows for sorting
// delay. MED_LOAD_AT moves the median load later in the sorting phase to wait for
// the pipeline ranks of the row sorter (default: LATCH_STAGES, so the median
// registers load once the last sorted row has reached the storing registers).
// The select counter, which the original architecture leaves unspecified, is part of this
// unit. start is accepted only when idle (busy low).
// Timing: the cycle after start is the first MUX cycle (sel = 0); done is high in
// the E4 cycle, 19 cycles after that.
module control_unit
  import median_pkg::*;
#(
  parameter int unsigned SORT_EDGES  = 8,
  parameter int unsigned MED_LOAD_AT = LATCH_STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic [SEL_W-1:0] sel,
  output logic             e1,
  output logic             e2,
  output logic             med_load,
  output logic             dmr_load,
  output logic             e3,
  output logic             e4,
  output logic             done
);
  phase_e     phase;
  logic [3:0] cnt;

  initial begin
    assert (SORT_EDGES >= MED_LOAD_AT + 2 && SORT_EDGES <= 16)
      else $error("SORT_EDGES must be MED_LOAD_AT+2 .. 16");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
    end else begin
      unique case (phase)
        PH_IDLE: begin
          cnt <= '0;
          if (start) phase <= PH_MUX;
        end
        PH_MUX: begin
          if (cnt == 4'd8) begin
            cnt   <= '0;
            phase <= PH_SORT;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        PH_SORT: begin
          if (cnt == 4'(SORT_EDGES - 1)) begin
            cnt   <= '0;
            phase <= PH_SISO;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        PH_SISO:  phase <= PH_SISOA;
        PH_SISOA: phase <= PH_IDLE;
        default:  phase <= PH_IDLE;
      endcase
    end
  end

  // schedule rules: the stage enables never overlap and the select stays in 0..8
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({e2, med_load, dmr_load, e3, e4}))
    else $error("control_unit: overlapping stage enables");
  assert property (@(posedge clk) disable iff (!rst_n) sel <= 4'd8)
    else $error("control_unit: select out of range");

  assign busy     = (phase != PH_IDLE);
  assign e1       = (phase == PH_MUX);
  assign e2       = (phase == PH_MUX);
  assign sel      = (phase == PH_MUX) ? cnt : '0;
  assign med_load = (phase == PH_SORT) && (cnt == 4'(MED_LOAD_AT));
  assign dmr_load = (phase == PH_SORT) && (cnt == 4'(MED_LOAD_AT + 1));
  assign e3       = (phase == PH_SISO);
  assign e4       = (phase == PH_SISOA);
  assign done     = (phase == PH_SISOA);
endmodule
