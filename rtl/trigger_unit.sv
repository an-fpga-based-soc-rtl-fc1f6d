// Programmable trigger for the monitoring modules.
//
// Each monitoring module records only while its `active` bit is set. The host
// programs a two-bit mode per module (fr_tester_pkg::trg_mode_e):
//   OFF        the module never records
//   IMMEDIATE  the module records as soon as the trigger is armed
//   FRAME_ID   the module starts with the first frame start, on either
//              channel, whose ID equals match_id
//   CYCLE      the module starts with the cycle start whose cycle count equals
//              match_cycle
// A fired trigger stays active until the host re-arms (`arm` clears all
// modules and evaluates the modes afresh) or until a FIFO overflow (`stop`)
// halts all monitoring. That modules are started by a host-programmable
// trigger follows the design; the set of modes is this implementation's.
//
// Timing: an event in cycle t makes `active` high from cycle t+1, so the
// triggering frame itself is not recorded when its sop comes in the same
// cycle as the start event.
module trigger_unit
  import fr_tester_pkg::*;
#(
  parameter int unsigned N_MON = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   arm,
  input  logic [2*N_MON-1:0]     mode,
  input  logic [ID_W-1:0]        match_id,
  input  logic [CYC_W-1:0]       match_cycle,
  input  logic                   rx_start_a,
  input  logic [ID_W-1:0]        rx_id_a,
  input  logic                   rx_start_b,
  input  logic [ID_W-1:0]        rx_id_b,
  input  logic                   cycle_start,
  input  logic [CYC_W-1:0]       cycle_count,
  input  logic                   stop,
  output logic [N_MON-1:0]       active
);

  logic [N_MON-1:0] armed;
  logic             id_hit, cyc_hit;

  assign id_hit  = (rx_start_a && rx_id_a == match_id) || (rx_start_b && rx_id_b == match_id);
  assign cyc_hit = cycle_start && cycle_count == match_cycle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed  <= '0;
      active <= '0;
    end else if (stop) begin
      armed  <= '0;
      active <= '0;
    end else if (arm) begin
      armed  <= '1;
      active <= '0;
    end else begin
      for (int m = 0; m < N_MON; m++) begin
        if (armed[m]) begin
          unique case (trg_mode_e'(mode[2*m +: 2]))
            TRG_OFF:       ;
            TRG_IMMEDIATE: begin active[m] <= 1'b1; armed[m] <= 1'b0; end
            TRG_FRAME_ID:  if (id_hit)  begin active[m] <= 1'b1; armed[m] <= 1'b0; end
            TRG_CYCLE:     if (cyc_hit) begin active[m] <= 1'b1; armed[m] <= 1'b0; end
          endcase
        end
      end
    end
  end

endmodule
