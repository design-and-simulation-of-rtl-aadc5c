// bus_buffers: the tri-state buffers (74LS367) that drive the internal
// 4-bit data bus of the processor.
//
// Four sources can drive the bus: the switch buffer of input port r1, the
// switch buffer of input port r2, the output buffer of register C and the
// memory output buffer. The control generator enables at most one of them
// per clock cycle; the tri-state bus is modelled as the OR of the enabled
// drivers, and an idle bus reads as zero (pull-down), which INC A relies on
// to clear register B. An assertion flags two drivers enabled at once.
// Purely combinational.
// The buffers and their sources follow the original design; the idle value
// of the bus is this design's choice.
module bus_buffers #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,      // only samples the assertion
  input  logic             r1_en,
  input  logic [WIDTH-1:0] r1,
  input  logic             r2_en,
  input  logic [WIDTH-1:0] r2,
  input  logic             c_en,
  input  logic [WIDTH-1:0] c,
  input  logic             mem_en,
  input  logic [WIDTH-1:0] mem,
  output logic [WIDTH-1:0] bus
);
  assign bus = ({WIDTH{r1_en}}  & r1) |
               ({WIDTH{r2_en}}  & r2) |
               ({WIDTH{c_en}}   & c)  |
               ({WIDTH{mem_en}} & mem);

  // Bus contention: at most one tri-state buffer may be enabled.
  a_one_driver: assert property (@(posedge clk) $onehot0({r1_en, r2_en, c_en, mem_en}))
    else $error("bus_buffers: several drivers enabled");
endmodule
