616e65657368202051eef10376f9e090c6760899aa7a0b33393132333435363738
70616967652020201fe2421bd48d69fb35f25431dcfd88b5393233343536373839
616c6578202020201035c2a9238a9796610b170295a86d67393334353637383930
67696d2020202020c70bc577e3e09155723352272becae3c393435363738393031
73747564656e74205f4dcc3b5aa765d61d8327deb882cf99393536373839303132
