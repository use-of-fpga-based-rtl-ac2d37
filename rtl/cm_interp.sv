// cm_interp: interpolation of the characteristic map between four nodes.
//
// From the point (x, y), the enclosing interval ends x0 <= x1, y0 <= y1 and the
// four node values z00 = z(x0,y0), z10 = z(x1,y0), z01 = z(x0,y1),
// z11 = z(x1,y1), computes
//   tx = clamp((x-x0)/(x1-x0), 0, 1),  ty = clamp((y-y0)/(y1-y0), 0, 1)
//   method 1 (bilinear):  z0 = z00 + tx*(z10-z00), z1 = z01 + tx*(z11-z01),
//                         z  = z0 + ty*(z1-z0)
//   method 0 (nearest):   the node nearest in (tx, ty), i.e. z[tx>=0.5][ty>=0.5]
// in IEEE 754 single precision. One shared floating-point unit (add, subtract,
// multiply or divide) does one operation per clock under a fixed step sequence,
// so latency is constant: done pulses 7 clocks after start for nearest and 16
// for bilinear. Inputs must stay stable until done. Smoothing with the four
// adjacent nodes and the choice between several methods follow the CEL; the two
// methods offered, the clamping and the sequential unit are this design's.
module cm_interp
  import cel_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic method,
  input  f32_t x,
  input  f32_t x0,
  input  f32_t x1,
  input  f32_t y,
  input  f32_t y0,
  input  f32_t y1,
  input  f32_t z00,
  input  f32_t z10,
  input  f32_t z01,
  input  f32_t z11,
  output logic busy,
  output logic done,
  output f32_t z
);
  typedef enum logic [1:0] {OP_ADD, OP_SUB, OP_MUL, OP_DIV} op_e;

  localparam f32_t F32_HALF = 32'h3F00_0000;

  logic [3:0] step;
  op_e        op;
  f32_t       opa, opb, res, res_clamped;
  f32_t       tmp, tx, ty, z0, z1;

  // Operand selection per step.
  always_comb begin
    op  = OP_SUB;
    opa = x;
    opb = x0;
    unique case (step)
      4'd0:  begin op = OP_SUB; opa = x;   opb = x0;  end  // tmp = x-x0
      4'd1:  begin op = OP_SUB; opa = x1;  opb = x0;  end  // tx  = x1-x0
      4'd2:  begin op = OP_DIV; opa = tmp; opb = tx;  end  // tx  = tmp/tx
      4'd3:  begin op = OP_SUB; opa = y;   opb = y0;  end
      4'd4:  begin op = OP_SUB; opa = y1;  opb = y0;  end
      4'd5:  begin op = OP_DIV; opa = tmp; opb = ty;  end
      4'd6:  begin op = OP_SUB; opa = z10; opb = z00; end
      4'd7:  begin op = OP_MUL; opa = tmp; opb = tx;  end
      4'd8:  begin op = OP_ADD; opa = z00; opb = tmp; end  // z0
      4'd9:  begin op = OP_SUB; opa = z11; opb = z01; end
      4'd10: begin op = OP_MUL; opa = tmp; opb = tx;  end
      4'd11: begin op = OP_ADD; opa = z01; opb = tmp; end  // z1
      4'd12: begin op = OP_SUB; opa = z1;  opb = z0;  end
      4'd13: begin op = OP_MUL; opa = tmp; opb = ty;  end
      4'd14: begin op = OP_ADD; opa = z0;  opb = tmp; end  // z
      default: ;
    endcase
    unique case (op)
      OP_ADD:  res = f32_add(opa, opb);
      OP_SUB:  res = f32_sub(opa, opb);
      OP_MUL:  res = f32_mul(opa, opb);
      default: res = f32_div(opa, opb);
    endcase
    // Fractions are clamped to [0, 1].
    if (res[31] || res[30:23] == 8'd0) res_clamped = F32_ZERO;
    else if (f32_lt(F32_ONE, res))     res_clamped = F32_ONE;
    else                               res_clamped = res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
      tmp  <= F32_ZERO;
      tx   <= F32_ZERO;
      ty   <= F32_ZERO;
      z0   <= F32_ZERO;
      z1   <= F32_ZERO;
      z    <= F32_ZERO;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          step <= '0;
        end
      end else begin
        step <= step + 1'b1;
        unique case (step)
          4'd0, 4'd3, 4'd6, 4'd7, 4'd9, 4'd10, 4'd12, 4'd13: tmp <= res;
          4'd1:  tx <= res;
          4'd2:  tx <= res_clamped;
          4'd4:  ty <= res;
          4'd5:  ty <= res_clamped;
          4'd8:  z0 <= res;
          4'd11: z1 <= res;
          default: ;
        endcase
        if (step == 4'd5 && !method) begin
          busy <= 1'b0;
          done <= 1'b1;
          unique case ({f32_le(F32_HALF, tx), f32_le(F32_HALF, res_clamped)})
            2'b00: z <= z00;
            2'b10: z <= z10;
            2'b01: z <= z01;
            default: z <= z11;
          endcase
        end else if (step == 4'd14) begin
          busy <= 1'b0;
          done <= 1'b1;
          z    <= res;
        end
      end
    end
  end
endmodule
