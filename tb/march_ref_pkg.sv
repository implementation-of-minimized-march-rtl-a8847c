// march_ref_pkg: reference model of the March mSR operation stream, for
// testbenches. Builds, from the algorithm's notation, the list of memory
// operations a correct controller issues, one per clock cycle:
//   {w0}; up(w1,r1,w0); up(r0,r0); up(w1); down(r1,w0,r0,w1); down(r1,r1)
// with "up" visiting words 0..N-1 and "down" N-1..0, and value 0/1 meaning
// an all-zeros / all-ones word.
package march_ref_pkg;

  typedef struct {
    bit          write;   // 1 = write, 0 = read
    int unsigned addr;
    bit          value;   // data written or expected
    int unsigned elem;    // March element E0..E5
    int unsigned k;       // operation index inside the element
  } ref_op_t;

  function automatic void build_msr(input int unsigned n, ref ref_op_t ops[$]);
    // element: direction (1 = down), op string ("w0","r1",...)
    string el_ops [6][$];
    bit    el_down[6];
    ref_op_t o;
    el_ops[0] = '{"w0"};               el_down[0] = 0;
    el_ops[1] = '{"w1", "r1", "w0"};   el_down[1] = 0;
    el_ops[2] = '{"r0", "r0"};         el_down[2] = 0;
    el_ops[3] = '{"w1"};               el_down[3] = 0;
    el_ops[4] = '{"r1", "w0", "r0", "w1"}; el_down[4] = 1;
    el_ops[5] = '{"r1", "r1"};         el_down[5] = 1;
    ops.delete();
    for (int e = 0; e < 6; e++) begin
      for (int unsigned i = 0; i < n; i++) begin
        foreach (el_ops[e][k]) begin
          o.write = (el_ops[e][k][0] == "w");
          o.value = (el_ops[e][k][1] == "1");
          o.addr  = el_down[e] ? (n - 1 - i) : i;
          o.elem  = e;
          o.k     = k;
          ops.push_back(o);
        end
      end
    end
  endfunction

endpackage
