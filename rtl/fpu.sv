// fpu: one lane of the floating-point SIMD module. The CPU holds two.
//
// Contains the integer/float converter (fp_cvt), the adder/subtractor
// (fp_addsub), the multiplier (fp_mul), the divider (fp_div), the square
// root unit (fp_sqrt) and the Newton-Raphson iteration unit (nr_iter) that
// serves the last two. op (fop_e) carries the document's select signals:
// op[0] = sel[0] picks add or subtract, op[2:1] = sel[2:1] picks the E3
// output among adder, multiplier, divider and square root, op[3] marks a
// conversion and op[4] = i_f its direction.
//
// Timing: op/a/b/r are the E1 stage inputs (registered by the CPU). All
// arithmetic units are three-stage pipelines, so y is the E3 result of the
// operation presented two cycles earlier. A conversion is done in E1 and
// registered once: cvt_e2 shows it in E2 (the CPU forwards it from there)
// and y shows it again in E3. The iteration interface (ds_*) is used from the
// ID stage: ds_start with ds_mode (0 = 1/b, 1 = 1/sqrt) and the operand
// ds_x; ds_done rises when ds_r is ready and ds_ack releases the unit.
module fpu
  import simd_pkg::*;
#(
  parameter int unsigned NR_ITER = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // ID stage: Newton-Raphson iteration
  input  logic        ds_start,
  input  logic        ds_mode,
  input  logic [31:0] ds_x,
  input  logic        ds_ack,
  output logic        ds_busy,
  output logic        ds_done,
  output logic [31:0] ds_r,
  // E1 stage inputs
  input  fop_e        op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] r,
  // results
  output logic [31:0] cvt_e2,
  output logic [31:0] y
);

  logic [31:0] y_add, y_mul, y_div, y_sqrt, y_cvt;
  logic [31:0] cvt_e3;
  fop_e        op_e2, op_e3;

  nr_iter #(.ITER(NR_ITER)) u_nr (
    .clk, .rst_n, .start(ds_start), .mode(ds_mode), .x(ds_x), .ack(ds_ack),
    .busy(ds_busy), .done(ds_done), .result(ds_r)
  );

  fp_cvt    u_cvt  (.i_f(op[4]), .a(a), .y(y_cvt));
  fp_addsub u_add  (.clk, .rst_n, .sub(op[0]), .a(a), .b(b), .y(y_add));
  fp_mul    u_mul  (.clk, .rst_n, .a(a), .b(b), .y(y_mul));
  fp_div    u_div  (.clk, .rst_n, .a(a), .b(b), .r(r), .y(y_div));
  fp_sqrt   u_sqrt (.clk, .rst_n, .x(a), .r(r), .y(y_sqrt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_e2  <= FOP_ADD;
      op_e3  <= FOP_ADD;
      cvt_e2 <= '0;
      cvt_e3 <= '0;
    end else begin
      op_e2  <= op;
      op_e3  <= op_e2;
      cvt_e2 <= y_cvt;
      cvt_e3 <= cvt_e2;
    end
  end

  // E3 output selector (sel[2:1]) and conversion bypass.
  always_comb begin
    if (op_e3[3])
      y = cvt_e3;
    else begin
      unique case (op_e3[2:1])
        2'b00:   y = y_add;
        2'b01:   y = y_mul;
        2'b10:   y = y_div;
        default: y = y_sqrt;
      endcase
    end
  end

endmodule
