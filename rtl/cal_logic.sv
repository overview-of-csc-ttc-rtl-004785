// cal_logic: CAL output to the transition module. CAL is a one-clock,
// registered pulse generated when an enabled source triggers: TDC triggers if
// cal_en_tdc (C bit of TTCR_TTCC_Setup), synchronous-trigger-generator
// triggers if cal_en_stg (c bit). The sources are taken ahead of the trigger
// delay pipeline and the enables are independent of the trigger enables.
module cal_logic (
  input  logic clk,
  input  logic cal_en_tdc,
  input  logic cal_en_stg,
  input  logic tdc_trigger,
  input  logic stg_trigger,
  output logic cal
);
  always_ff @(posedge clk)
    cal <= (cal_en_tdc && tdc_trigger) || (cal_en_stg && stg_trigger);
endmodule
