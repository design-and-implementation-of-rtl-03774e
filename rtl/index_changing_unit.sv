// index_changing_unit: the ICU of one working cell.
//
// The ICU follows which cell currently performs its working cell's function:
// the working cell itself, or one of its four spares (left, down, right,
// top). When that cell reports a permanent fault, the ICU requests the first
// spare whose state bit is 0, in the order left, down, right, top, and on
// the spare's grant moves the function there (on_spare = 1, dir = that
// spare) and isolates the working cell (wc_en = 0). A fault of the spare in
// use starts the same search again. When no spare is free the ICU raises
// `failed`; `halt` (the OR of all `failed` in the system) stops every
// function.
//
// Issue control: `ready` says the function can take an operation this
// clock; `use_wc` / `use_sc[d]` say which cell receives it. While a repair is
// pending, or the spare is still differentiating, ready is 0.
//
// The ICU also holds the perfect genome of its function (parameter GENOME),
// used by the fault detection units and by the differentiating spare.
// Timing: request combinational on the fault; the switch happens at the
// clock edge of the grant. The search order and the failure rule follow the
// design's state-change table; the request/grant handshake is this
// implementation's choice.
module index_changing_unit
  import ftds_pkg::*;
#(
  parameter func_e GENOME = FUNC_ADD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             halt,
  input  logic             wc_fault,
  input  logic [NDIR-1:0]  sc_fault,
  input  logic [NDIR-1:0]  sc_state,
  input  logic [NDIR-1:0]  sc_ready,
  input  logic [NDIR-1:0]  grant,
  output logic [NDIR-1:0]  req,
  output logic             on_spare,
  output dir_e             dir,
  output logic             wc_en,
  output logic             failed,
  output func_e            perfect,
  output logic             ready,
  output logic             use_wc,
  output logic [NDIR-1:0]  use_sc
);
  logic fault_now;
  logic none_free;

  assign perfect   = GENOME;
  assign fault_now = on_spare ? sc_fault[dir] : wc_fault;

  always_comb begin
    req       = '0;
    none_free = 1'b1;
    if (fault_now && !failed) begin
      for (int d = NDIR - 1; d >= 0; d--) begin
        if (!sc_state[d]) begin
          req       = NDIR'(1) << d;
          none_free = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      on_spare <= 1'b0;
      dir      <= DIR_L;
      failed   <= 1'b0;
    end else if (fault_now && !failed) begin
      if (none_free) begin
        failed <= 1'b1;
      end else if ((req & grant) != '0) begin
        on_spare <= 1'b1;
        for (int d = 0; d < NDIR; d++) begin
          if (req[d]) dir <= dir_e'(d);
        end
      end
    end
  end

  assign wc_en  = ~on_spare;
  assign ready  = ~halt & ~failed & ~fault_now & (on_spare ? sc_ready[dir] : 1'b1);
  assign use_wc = ~on_spare;
  always_comb begin
    use_sc = '0;
    if (on_spare) use_sc[dir] = 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req));
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
