// datapath: registers A, B, C, D, the ALU, the internal bus, the memory unit
// and the status register of the 4-bit processor.
//
// Registers A and B are the process registers and the ALU operands. The ALU
// result always goes to register C (the accumulator); register C reaches
// the rest of the machine only through its output buffer on the internal
// bus. From the bus, A is loaded (result write-back or input port r1), B is
// loaded (input port r2 or the memory unit), D is loaded (output port) and
// the memory unit is written. A and B can also shift right in place.
// The status register holds 1 when A equals B; it is loaded during JNZ,
// with the ALU set to A xor B, from a zero test on F. The ALU carry out is
// stored in the memory unit during ADD A,B.
// Interface: all control comes from the control word `ctrl`; every register
// changes on the rising edge in the cycle whose clock enable is high.
// The register set, the buses and the flow of data follow the original
// block diagram and operating sequence; the status register's load point
// and the single-bus model are this design's choices.
module datapath
  import cpu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ctrl_t        ctrl,
  input  logic [3:0] port_r1,   // input port r1 switches
  input  logic [3:0] port_r2,   // input port r2 switches
  output logic [3:0] reg_a,
  output logic [3:0] reg_b,
  output logic [3:0] reg_c,
  output logic [3:0] reg_d,     // output port
  output logic [3:0] mem_q,     // memory unit contents
  output logic         status     // 1 when A == B at the last JNZ
);
  logic [3:0] bus, alu_f;
  logic         alu_cn4, alu_aeqb;

  bus_buffers u_bus (
    .clk(clk),
    .r1_en(ctrl.a_buf_en), .r1(port_r1),
    .r2_en(ctrl.b_buf_en), .r2(port_r2),
    .c_en(ctrl.c_buf_en),  .c(reg_c),
    .mem_en(ctrl.mem_rd),  .mem(mem_q),
    .bus(bus)
  );

  shift_register_4b u_reg_a (
    .clk(clk), .rst_n(rst_n), .clk_en(ctrl.clk_a), .sh_ld_n(ctrl.sh_a), .d(bus), .q(reg_a));
  shift_register_4b u_reg_b (
    .clk(clk), .rst_n(rst_n), .clk_en(ctrl.clk_b), .sh_ld_n(ctrl.sh_b), .d(bus), .q(reg_b));
  shift_register_4b u_reg_c (
    .clk(clk), .rst_n(rst_n), .clk_en(ctrl.clk_c), .sh_ld_n(1'b0), .d(alu_f), .q(reg_c));
  shift_register_4b u_reg_d (
    .clk(clk), .rst_n(rst_n), .clk_en(ctrl.clk_d), .sh_ld_n(1'b0), .d(bus), .q(reg_d));

  alu_74181 u_alu (
    .a(reg_a), .b(reg_b), .s(ctrl.alu_s), .m(ctrl.alu_m), .cn(ctrl.alu_cn),
    .f(alu_f), .cn4(alu_cn4), .aeqb(alu_aeqb)
  );

  storage_register u_mem (
    .clk(clk), .rst_n(rst_n), .wr(ctrl.mem_wr), .carry_wr(ctrl.carry_wr),
    .d(bus), .carry(~alu_cn4), .q(mem_q)
  );

  // Status register: A == B, tested as A xor B == 0 while JNZ runs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              status <= 1'b0;
    else if (ctrl.status_ld) status <= (alu_f == 4'b0000);
  end
endmodule
