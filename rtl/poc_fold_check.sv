// poc_fold_check -- one step of the POC foldability check.
//
// Compares the combined bytecode N (everything folded so far, as an fstate_t)
// with the next bytecode N+1 and reports
//   fi    1 = foldable instructions (FI), 0 = serial instructions (SI)
//   cont  1 = continuing status (C), 0 = ending status (E)
//   nxt   the new combined bytecode N.
// The rules are the document's foldability table:
//   P  + P            -> combined producer, SI/C
//   P  + O_E or O_C   -> operator reading the producers, FI/C
//   P  + O_B          -> branch reading the producers, FI/E
//   P  + C            -> producer moved straight to the local variable, FI/E
//   O_E/O_C + C       -> operator writing the local variable, FI/E
//   everything else   -> SI/E
// and data types (hence widths) must match, else SI/E.
// Where the document leaves the count of producers open this design requires
// the folded producers to be no more than the operator's source operands (the
// missing ones come from the stack) and exactly one for a consumer.  The
// document's table marks O+C as "FI/C" while its worked example ends that
// step with "FI/E"; this cell follows the example, since nothing can fold
// after a result that has already been written to a local variable.
//
// Purely combinational.
module poc_fold_check
  import poc_pkg::*;
(
  input  fstate_t cur,
  input  dec_t    nb,      // bytecode N+1
  output logic    fi,
  output logic    cont,
  output fstate_t nxt
);

  logic types_ok;

  always_comb begin
    types_ok = 1'b1;
    for (int i = 0; i < MAX_FOLD; i++)
      if (i < int'(cur.np) && nb.stype != DT_ANY && cur.ptype[i] != nb.stype)
        types_ok = 1'b0;
  end

  always_comb begin
    fi   = 1'b0;
    cont = 1'b0;
    nxt  = cur;
    if (nb.valid) begin
      unique case (cur.kind)
        POC_P: begin
          unique case (nb.poc)
            POC_P: begin
              fi = 1'b0; cont = 1'b1;
              if (cur.np < 3'(MAX_FOLD)) begin
                nxt.ptype[cur.np] = nb.dtype;
                nxt.np            = cur.np + 3'd1;
              end else begin
                cont = 1'b0;
              end
            end
            POC_OE, POC_OC, POC_OB: begin
              if (cur.np <= nb.nsrc && types_ok) begin
                fi          = 1'b1;
                cont        = (nb.poc != POC_OB);
                nxt.kind    = nb.poc;
                nxt.has_res = nb.has_res;
                nxt.rtype   = nb.dtype;
              end
            end
            POC_C: begin
              if (cur.np == 3'd1 && cur.ptype[0] == nb.dtype) begin
                fi       = 1'b1;
                nxt.kind = POC_C;
              end
            end
            default: ;   // O_T: SI/E
          endcase
        end
        POC_OE, POC_OC: begin
          if (nb.poc == POC_C && cur.has_res && cur.rtype == nb.dtype) begin
            fi          = 1'b1;
            nxt.has_res = 1'b0;
          end
        end
        default: ;       // O_B, O_T, C: SI/E
      endcase
    end
  end

endmodule
